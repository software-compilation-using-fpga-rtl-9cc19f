// tb_bram_dp: self-checking test of the dual-port block RAM.
//
// Random reads and writes are issued on both ports against a shadow array kept by the
// testbench. Each read result is checked one cycle after the read (the RAM's latency),
// including read-before-write on a port that reads and writes one address together and
// a read on one port of an address written by the other port in an earlier cycle.
module tb_bram_dp;
  localparam int DW = 32;
  localparam int DEPTH = 24;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [DW-1:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [DW-1:0] shadow [DEPTH];

  int checks = 0, failures = 0;

  bram_dp #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] exp_a, exp_b;
    bit chk_a, chk_b;
    // fill through port A, read back through port B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = $urandom; shadow[i] = a_wdata;
      b_en = 0;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      a_en = $urandom_range(0, 3) != 0; a_we = $urandom_range(0, 1); a_addr = AW'($urandom_range(0, DEPTH - 1));
      b_en = $urandom_range(0, 3) != 0; b_we = $urandom_range(0, 1); b_addr = AW'($urandom_range(0, DEPTH - 1));
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) b_we = 0;
      a_wdata = $urandom; b_wdata = $urandom;
      chk_a = a_en; chk_b = b_en;
      exp_a = shadow[a_addr]; exp_b = shadow[b_addr];
      @(posedge clk);
      if (a_en && a_we) shadow[a_addr] = a_wdata;
      if (b_en && b_we) shadow[b_addr] = b_wdata;
      #1;
      if (chk_a) begin checks++; if (a_rdata !== exp_a) begin failures++; $display("FAIL A @%0d", a_addr); end end
      if (chk_b) begin checks++; if (b_rdata !== exp_b) begin failures++; $display("FAIL B @%0d", b_addr); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
