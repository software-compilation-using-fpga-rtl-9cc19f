// tb_regalloc_top: end-to-end test of the register allocator through its host bus.
//
// The testbench plays the host processor. For each program it writes the 48-byte
// records into the instruction memory over the Avalon-MM slave, reads them back to
// validate them, writes N_INSTR, writes the start command, polls STATUS until done, then
// reads the whole liveness table and allocation map and the cycle and spill counters and
// compares all of them with the reference model. The top runs with its default sizes.
//
// Programs: the gcd function (the reference workload) in two encodings, one with the
// stack loads and stores an unoptimised compiler emits, a register-pressure program that
// needs more than 13 registers at once, random programs, and gcd with one register
// number out of range. The mechanisms of the design are counted over the run and each
// must occur: a physical register reused after its holder died, a spill to a stack slot,
// a lookup that finds a register already mapped, the out-of-range error flag.
module tb_regalloc_top;
  import regalloc_pkg::*;
  import regalloc_ref_pkg::*;

  localparam int MI = 64;    // the top's default sizes
  localparam int MV = 64;
  localparam int NP = NUM_GP_REGS;
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
  int n_reuse = 0, n_spill = 0, n_hit = 0, n_err = 0, n_runs = 0;

  regalloc_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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
    @(negedge clk);
    avs_read = 0;
    d = avs_readdata;
    if (!avs_readdatavalid) begin failures++; $display("FAIL: readdatavalid"); end
  endtask

  task automatic run(prog_t pr, int n, string name, bit expect_err = 0);
    tab_t valid, last, kind, num;
    int spills, allocs, hits, reuses, polls;
    logic [31:0] d;
    live_t e;
    map_t m;
    ref_liveness(pr, n, MV, valid, last);
    ref_alloc(pr, n, MV, NP, valid, last, kind, num, spills, allocs, hits, reuses);

    for (int i = 0; i < n; i++)
      for (int w = 0; w < WORDS_PER_INSTR; w++) wr(adr(1, i * WORDS_PER_INSTR + w), word_of(pr[i], w));
    for (int i = 0; i < n; i++)
      for (int w = 0; w < WORDS_PER_INSTR; w++) begin
        rd(adr(1, i * WORDS_PER_INSTR + w), d);
        check(d == word_of(pr[i], w), $sformatf("%s: record %0d word %0d", name, i, w));
      end
    wr(adr(0, 2), n);
    wr(adr(0, 0), 1);
    polls = 0;
    do begin rd(adr(0, 1), d); polls++; end while (!d[1] && polls < 100000);
    check(d[1] && !d[0], $sformatf("%s: done and not busy", name));
    check(done, $sformatf("%s: done output", name));
    check(d[2] == expect_err, $sformatf("%s: error flag %0d", name, d[2]));
    if (d[2]) n_err++;

    for (int r = 0; r < MV; r++) begin
      rd(adr(2, r), d); e = live_t'(d);
      check(e.valid == valid[r][0] && (!e.valid || int'(e.last) == last[r]),
            $sformatf("%s: liveness v%0d", name, r));
      rd(adr(3, r), d); m = map_t'(d);
      check(int'(m.kind) == kind[r] && (kind[r] == int'(RK_NONE) || int'(m.num) == num[r]),
            $sformatf("%s: v%0d -> %0d %0d expected %0d %0d", name, r, m.kind, m.num, kind[r], num[r]));
    end
    rd(adr(0, 3), d);
    check(int'(d) == live_cycles(pr, n, MV), $sformatf("%s: liveness cycles %0d expected %0d",
                                                       name, d, live_cycles(pr, n, MV)));
    if (name.substr(0, 2) == "gcd") $display("%s: liveness %0d cycles (%0d ns at 50 MHz)", name, d, 20 * d);
    rd(adr(0, 4), d);
    check(int'(d) == alloc_cycles(pr, n, MV, spills, allocs),
          $sformatf("%s: allocation cycles %0d expected %0d", name, d,
                    alloc_cycles(pr, n, MV, spills, allocs)));
    if (name.substr(0, 2) == "gcd") $display("%s: allocation %0d cycles (%0d ns at 50 MHz)", name, d, 20 * d);
    rd(adr(0, 5), d);
    check(int'(d) == spills, $sformatf("%s: spills %0d expected %0d", name, d, spills));
    n_spill += int'(d);
    n_reuse += reuses;
    n_hit   += hits;
    n_runs++;
  endtask

  initial begin
    prog_t pr;
    int n;
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(adr(0, 1), d);
    check(d == 0, "idle after reset");

    n = gcd_program(pr);
    run(pr, n, "gcd");
    rd(adr(3, 4), d); check(d == mk_op(RK_PHYS, 2), "gcd: v4 reuses r2");
    rd(adr(3, 5), d); check(d == mk_op(RK_PHYS, 1), "gcd: v5 reuses r1");

    n = gcd_stack_program(pr);
    run(pr, n, "gcd with stack traffic");

    n = pressure_program(40, pr);
    run(pr, n, "pressure");

    for (int t = 0; t < 6; t++) begin
      n = random_program($urandom_range(1, MI), $urandom_range(1, MV), pr);
      run(pr, n, $sformatf("random %0d", t));
    end

    n = gcd_program(pr);
    pr[6].src2 = mk_op(RK_VIRT, MV + 5);
    run(pr, n, "out of range", 1);

    $display("mechanisms: runs=%0d reuse=%0d spill=%0d hit=%0d error=%0d",
             n_runs, n_reuse, n_spill, n_hit, n_err);
    check(n_reuse > 0, "a freed register was reused");
    check(n_spill > 0, "a register was spilled");
    check(n_hit > 0,   "a lookup found an existing mapping");
    check(n_err > 0,   "the out-of-range error was raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
