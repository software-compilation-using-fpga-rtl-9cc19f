// tb_regalloc_seq: self-checking test of the two-phase sequencer.
//
// The testbench plays both state machines: it answers the liveness start pulse with a
// done pulse after a random number of cycles, then the allocation start pulse likewise.
// It checks the order of the pulses, busy and done, that a start while busy is ignored,
// and that the two cycle counters equal the delays it chose.
module tb_regalloc_seq;
  logic clk = 0, rst_n = 0, start = 0, live_done = 0, alloc_done = 0;
  logic live_start, alloc_start, busy, done;
  logic [31:0] live_cycles, alloc_cycles;

  int checks = 0, failures = 0;

  regalloc_seq dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    int dl, da, w;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!busy && !done, "idle after reset");
    for (int t = 0; t < 30; t++) begin
      dl = $urandom_range(1, 40); da = $urandom_range(1, 40);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      check(live_start && !alloc_start && busy && !done, "liveness start pulse");
      // the first cycle of a phase is the start pulse; done comes dl cycles after it
      for (int c = 1; c < dl; c++) begin
        @(negedge clk);
        check(!live_start && !alloc_start, "no pulses while liveness runs");
        if (c == 2) start = 1;   // ignored while busy
        if (c == 3) start = 0;
      end
      start = 0;
      @(negedge clk); live_done = 1;
      @(negedge clk); live_done = 0;
      check(alloc_start && !live_start && busy, "allocation start pulse");
      check(live_cycles == 32'(dl), $sformatf("live cycles %0d expected %0d", live_cycles, dl));
      for (int c = 1; c < da; c++) @(negedge clk);
      @(negedge clk); alloc_done = 1;
      @(negedge clk); alloc_done = 0;
      check(!busy && done, "done after allocation");
      check(alloc_cycles == 32'(da), $sformatf("alloc cycles %0d expected %0d", alloc_cycles, da));
      w = $urandom_range(0, 5);
      repeat (w) @(negedge clk);
      check(done && !live_start, "done is sticky");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
