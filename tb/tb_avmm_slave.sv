// tb_avmm_slave: self-checking test of the host Avalon-MM slave.
//
// The three memories behind the slave are modelled as arrays with one-cycle read
// latency, and the status inputs are driven with random values. The test writes and
// reads back instruction memory words, reads the liveness and map regions, checks that
// writes to those read-only regions are dropped, reads every status register, checks the
// start pulse and the saturation of N_INSTR, and checks that read data comes exactly one
// cycle after the read with readdatavalid.
module tb_avmm_slave;
  import regalloc_pkg::*;

  localparam int MI = 8;
  localparam int MV = 16;
  localparam int IMAW = $clog2(MI * WORDS_PER_INSTR);
  localparam int IW   = $clog2(MI + 1);
  localparam int VW   = $clog2(MV);
  localparam int OW   = (IMAW > VW) ? ((IMAW > 3) ? IMAW : 3) : ((VW > 3) ? VW : 3);
  localparam int AW   = OW + 2;

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] avs_address = '0;
  logic avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic avs_readdatavalid, avs_waitrequest;
  logic im_en, im_we, lv_en, mp_en;
  logic [IMAW-1:0] im_addr;
  logic [31:0] im_wdata, im_rdata, lv_rdata, mp_rdata;
  logic [VW-1:0] lv_addr, mp_addr;
  logic start;
  logic [IW-1:0] n_instr;
  logic busy = 0, done = 0, err = 0;
  logic [31:0] live_cycles = '0, alloc_cycles = '0;
  logic [15:0] n_spill = '0;

  logic [31:0] imem [MI * WORDS_PER_INSTR];
  logic [31:0] lmem [MV];
  logic [31:0] mmem [MV];

  int checks = 0, failures = 0, starts = 0;

  avmm_slave #(.MAX_INSTR(MI), .MAX_VREGS(MV)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (im_en) begin
      im_rdata <= imem[im_addr];
      if (im_we) imem[im_addr] <= im_wdata;
    end
    if (lv_en) lv_rdata <= lmem[lv_addr];
    if (mp_en) mp_rdata <= mmem[mp_addr];
    if (start) starts++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [AW-1:0] adr(int region, int offs);
    return AW'((region << OW) | offs);
  endfunction

  task automatic wr(logic [AW-1:0] a, logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_write = 1; avs_writedata = d;
    @(negedge clk);
    avs_write = 0;
  endtask

  task automatic rd(logic [AW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1;
    check(!avs_waitrequest, "no wait states");
    @(negedge clk);
    avs_read = 0;
    check(avs_readdatavalid, "readdatavalid one cycle after read");
    d = avs_readdata;
    @(negedge clk);
    check(!avs_readdatavalid, "readdatavalid for one cycle only");
  endtask

  initial begin
    logic [31:0] d, shadow [MI * WORDS_PER_INSTR];
    foreach (lmem[i]) lmem[i] = $urandom;
    foreach (mmem[i]) mmem[i] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // instruction memory: write all, read all back
    foreach (shadow[i]) begin shadow[i] = $urandom; wr(adr(1, i), shadow[i]); end
    foreach (shadow[i]) begin rd(adr(1, i), d); check(d == shadow[i], $sformatf("imem %0d", i)); end

    // read-only regions
    for (int i = 0; i < MV; i++) begin
      rd(adr(2, i), d); check(d == lmem[i], $sformatf("liveness %0d", i));
      wr(adr(3, i), ~mmem[i]);
      rd(adr(3, i), d); check(d == mmem[i], $sformatf("map %0d", i));
    end

    // status registers
    for (int t = 0; t < 20; t++) begin
      busy = 1'($urandom); done = 1'($urandom); err = 1'($urandom);
      live_cycles = $urandom; alloc_cycles = $urandom; n_spill = 16'($urandom);
      rd(adr(0, 1), d); check(d == {29'd0, err, done, busy}, "STATUS");
      rd(adr(0, 3), d); check(d == live_cycles, "LIVE_CYCLES");
      rd(adr(0, 4), d); check(d == alloc_cycles, "ALLOC_CYCLES");
      rd(adr(0, 5), d); check(d == {16'd0, n_spill}, "N_SPILL");
      rd(adr(0, 6), d); check(d == 0, "unused register reads 0");
    end

    // N_INSTR and its saturation
    wr(adr(0, 2), 5); rd(adr(0, 2), d); check(d == 5 && n_instr == 5, "N_INSTR = 5");
    wr(adr(0, 2), 1000); rd(adr(0, 2), d); check(d == MI, "N_INSTR saturates");

    // start command: a single pulse per write of bit 0
    check(starts == 0, "no start yet");
    wr(adr(0, 0), 1);
    @(negedge clk);
    check(starts == 1, "one start pulse");
    wr(adr(0, 0), 2);
    check(starts == 1, "bit 0 clear does not start");
    rd(adr(0, 0), d); check(d == 0, "CTRL reads 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
