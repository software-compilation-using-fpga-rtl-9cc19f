// tb_liveness_fsm: self-checking test of the liveness state machine.
//
// The instruction memory and the liveness memory are modelled here as arrays with the
// same one-cycle read latency as block RAM. Each test loads a program (the gcd function,
// random programs, an empty program, a program with an out-of-range register), runs the
// machine, and compares every liveness entry and the run's cycle count with the
// reference model. A watchdog ends the run if the machine hangs.
module tb_liveness_fsm;
  import regalloc_pkg::*;
  import regalloc_ref_pkg::*;

  localparam int MI = 32;
  localparam int MV = 16;
  localparam int IMAW = $clog2(MI * WORDS_PER_INSTR);
  localparam int IW   = $clog2(MI + 1);
  localparam int VW   = $clog2(MV);

  logic clk = 0, rst_n = 0, start = 0;
  logic [IW-1:0] n_instr = '0;
  logic busy, done, err;
  logic im_en, lv_we;
  logic [IMAW-1:0] im_addr;
  logic [31:0] im_rdata, lv_wdata;
  logic [VW-1:0] lv_addr;

  logic [31:0] imem [MI * WORDS_PER_INSTR];
  logic [31:0] lmem [MV];

  int checks = 0, failures = 0;

  liveness_fsm #(.MAX_INSTR(MI), .MAX_VREGS(MV)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (im_en) im_rdata <= imem[im_addr];
    if (lv_we) lmem[lv_addr] <= lv_wdata;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(prog_t pr, int n);
    foreach (imem[a]) imem[a] = 32'd0;
    for (int i = 0; i < n; i++)
      for (int w = 0; w < WORDS_PER_INSTR; w++) imem[i * WORDS_PER_INSTR + w] = word_of(pr[i], w);
    foreach (lmem[a]) lmem[a] = 32'hdead_beef;
  endtask

  task automatic run(prog_t pr, int n, string name);
    tab_t valid, last;
    int cyc = 0;
    live_t e;
    load(pr, n);
    ref_liveness(pr, n, MV, valid, last);
    @(negedge clk);
    n_instr = IW'(n);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (name == "gcd") $display("gcd done at %0t after %0d cycles", $time, cyc);
    check(cyc == live_cycles(pr, n, MV),
          $sformatf("%s: cycles %0d expected %0d", name, cyc, live_cycles(pr, n, MV)));
    @(negedge clk);
    check(!busy, $sformatf("%s: idle after done", name));
    for (int r = 0; r < MV; r++) begin
      e = live_t'(lmem[r]);
      check(e.valid == valid[r][0], $sformatf("%s: v%0d valid %0d expected %0d", name, r,
                                              e.valid, valid[r]));
      if (valid[r] != 0)
        check(int'(e.last) == last[r], $sformatf("%s: v%0d last %0d expected %0d", name, r,
                                                 e.last, last[r]));
    end
  endtask

  initial begin
    prog_t pr;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;

    n = gcd_program(pr);
    run(pr, n, "gcd");
    check(!err, "gcd: no error");
    // gcd: the quotient v2 dies at the multiply (5), the result v5 at the final move (13)
    check(lmem[2][15:0] == 16'd5 && lmem[5][15:0] == 16'd13, "gcd: ends of v2, v5");

    for (int t = 0; t < 20; t++) begin
      n = random_program($urandom_range(1, MI), $urandom_range(1, MV), pr);
      run(pr, n, $sformatf("random %0d", t));
    end

    run(pr, 0, "empty");

    n = gcd_program(pr);
    pr[4].src1 = mk_op(RK_VIRT, MV + 3);
    run(pr, n, "out of range");
    check(err, "out of range register flags an error");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
