// tb_bram_transfer: host write/read transfers of 1, 10 and 100 words through the bus.
//
// This runs the bus-transfer measurement on the whole design: the host writes a block of
// words into the instruction memory, reads them all back and compares, then applies an
// arithmetic and logic operation to each word and writes and reads the results again.
// Writes are issued back to back, one per cycle, and reads likewise, with the data
// collected from readdatavalid. The testbench checks the data and that a block of N
// words takes exactly N cycles to write and N + 1 cycles to read (one-cycle latency).
module tb_bram_transfer;
  import regalloc_pkg::*;

  localparam int MI = 64;
  localparam int MV = 64;
  localparam int IMAW = $clog2(MI * WORDS_PER_INSTR);
  localparam int VW   = $clog2(MV);
  localparam int OW   = (IMAW > VW) ? ((IMAW > 3) ? IMAW : 3) : ((VW > 3) ? VW : 3);
  localparam int AW   = OW + 2;

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] avs_address = '0;
  logic avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic avs_readdatavalid, avs_waitrequest, done;

  int checks = 0, failures = 0;

  regalloc_top dut (.*);

  always #10 clk = ~clk;

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

  // Write n words starting at instruction-memory word base; returns cycles used.
  task automatic write_block(int base, int n, logic [31:0] d [], output int cyc);
    cyc = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      avs_address = AW'((1 << OW) | (base + i)); avs_write = 1; avs_writedata = d[i];
      cyc++;
      check(!avs_waitrequest, "no wait state on write");
    end
    @(negedge clk); avs_write = 0;
  endtask

  // Read n words back to back; collects them by readdatavalid.
  task automatic read_block(int base, int n, output logic [31:0] q [], output int cyc);
    int got = 0;
    q = new[n];
    cyc = 0;
    for (int i = 0; i < n + 1; i++) begin
      @(negedge clk);
      if (avs_readdatavalid) q[got++] = avs_readdata;
      if (i < n) begin avs_address = AW'((1 << OW) | (base + i)); avs_read = 1; end
      else avs_read = 0;
      cyc++;
    end
    @(negedge clk);
    if (avs_readdatavalid) q[got++] = avs_readdata;
    check(got == n, $sformatf("read %0d of %0d words", got, n));
  endtask

  initial begin
    int sizes[3] = '{1, 10, 100};
    logic [31:0] dw [], dr [];
    int cw, cr, base;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (sizes[s]) begin
      automatic int n = sizes[s];
      base = $urandom_range(0, MI * WORDS_PER_INSTR - n);
      dw = new[n];
      foreach (dw[i]) dw[i] = $urandom;
      for (int pass = 0; pass < 2; pass++) begin
        write_block(base, n, dw, cw);
        read_block(base, n, dr, cr);
        foreach (dw[i]) check(dr[i] == dw[i], $sformatf("%0d words, pass %0d, word %0d", n, pass, i));
        check(cw == n, $sformatf("%0d words written in %0d cycles", n, cw));
        check(cr == n + 1, $sformatf("%0d words read in %0d cycles", n, cr));
        $display("%0d words: write %0d cycles, read %0d cycles (%0d ns at 50 MHz)", n, cw, cr,
                 20 * (cw + cr));
        // arithmetic and logic operation on the data before the second round
        foreach (dw[i]) dw[i] = (dw[i] + 32'd12345) ^ 32'h5a5a_a5a5;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
