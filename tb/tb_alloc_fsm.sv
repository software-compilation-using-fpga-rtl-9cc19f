// tb_alloc_fsm: self-checking test of the register allocation state machine.
//
// The instruction, liveness and map memories are modelled as arrays with one-cycle read
// latency. For each program the liveness memory is preloaded with the reference liveness
// table, the machine is run, and the whole allocation map, the spill count and the run's
// cycle count are compared with the reference model. The programs are the gcd function
// (register reuse, no spill), random programs, a register-pressure program with more
// than 13 values live at once (spills) and an empty program. The map memory is filled
// with garbage before each run to check that the machine clears it.
module tb_alloc_fsm;
  import regalloc_pkg::*;
  import regalloc_ref_pkg::*;

  localparam int MI = 64;
  localparam int MV = 32;
  localparam int NP = 13;
  localparam int IMAW = $clog2(MI * WORDS_PER_INSTR);
  localparam int IW   = $clog2(MI + 1);
  localparam int VW   = $clog2(MV);

  logic clk = 0, rst_n = 0, start = 0;
  logic [IW-1:0] n_instr = '0;
  logic busy, done;
  logic [15:0] n_spill;
  logic im_en, lv_en, mp_en, mp_we;
  logic [IMAW-1:0] im_addr;
  logic [VW-1:0] lv_addr, mp_addr;
  logic [31:0] im_rdata, lv_rdata, mp_rdata, mp_wdata;

  logic [31:0] imem [MI * WORDS_PER_INSTR];
  logic [31:0] lmem [MV];
  logic [31:0] mmem [MV];

  int checks = 0, failures = 0;
  int tot_spills = 0, tot_reuses = 0, tot_hits = 0;

  alloc_fsm #(.MAX_INSTR(MI), .MAX_VREGS(MV), .NUM_PHYS(NP)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (im_en) im_rdata <= imem[im_addr];
    if (lv_en) lv_rdata <= lmem[lv_addr];
    if (mp_en) begin
      mp_rdata <= mmem[mp_addr];
      if (mp_we) mmem[mp_addr] <= mp_wdata;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(prog_t pr, int n, string name);
    tab_t valid, last, kind, num;
    int spills, allocs, hits, reuses, cyc;
    map_t m;
    ref_liveness(pr, n, MV, valid, last);
    ref_alloc(pr, n, MV, NP, valid, last, kind, num, spills, allocs, hits, reuses);
    tot_spills += spills; tot_reuses += reuses; tot_hits += hits;
    foreach (imem[a]) imem[a] = 32'd0;
    for (int i = 0; i < n; i++)
      for (int w = 0; w < WORDS_PER_INSTR; w++) imem[i * WORDS_PER_INSTR + w] = word_of(pr[i], w);
    for (int r = 0; r < MV; r++) begin
      lmem[r] = {valid[r][0], 15'd0, 16'(last[r])};
      mmem[r] = $urandom;
    end
    @(negedge clk);
    n_instr = IW'(n);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == alloc_cycles(pr, n, MV, spills, allocs),
          $sformatf("%s: cycles %0d expected %0d", name, cyc,
                    alloc_cycles(pr, n, MV, spills, allocs)));
    check(int'(n_spill) == spills, $sformatf("%s: spills %0d expected %0d", name, n_spill, spills));
    for (int r = 0; r < MV; r++) begin
      m = map_t'(mmem[r]);
      check(int'(m.kind) == kind[r] && (kind[r] == int'(RK_NONE) || int'(m.num) == num[r]),
            $sformatf("%s: v%0d -> %s %0d expected %0d %0d", name, r, m.kind.name(), m.num,
                      kind[r], num[r]));
    end
  endtask

  initial begin
    prog_t pr;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;

    n = gcd_program(pr);
    run(pr, n, "gcd");
    // gcd: v0->r0, v1->r1, v2->r2, v3->r3, v4 reuses r2, v5 reuses r1
    check(mmem[4] == mk_op(RK_PHYS, 2) && mmem[5] == mk_op(RK_PHYS, 1), "gcd: v4->r2, v5->r1");

    n = pressure_program(MV, pr);
    run(pr, n, "pressure");
    check(n_spill == 16'(MV - NP), "pressure: registers beyond 13 spill");

    for (int t = 0; t < 20; t++) begin
      n = random_program($urandom_range(1, MI), $urandom_range(1, MV), pr);
      run(pr, n, $sformatf("random %0d", t));
    end

    run(pr, 0, "empty");

    check(tot_spills > 0 && tot_reuses > 0 && tot_hits > 0, "spill, reuse and lookup hit all seen");
    $display("spills=%0d reuses=%0d hits=%0d", tot_spills, tot_reuses, tot_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
