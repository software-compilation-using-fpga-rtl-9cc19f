// regalloc_top: the FPGA half of a hardware register allocator for ARM code.
//
// A host processor compiles a function down to ARM-like instructions that still use
// unlimited virtual registers, packs each instruction into a 48-byte Binary-IR record
// and writes the records into this block's instruction memory over the Avalon-MM slave.
// On a start command the block computes, for every virtual register, the last
// instruction that uses it (liveness_fsm), then maps every virtual register to one of the
// 13 general purpose registers r0..r12, reusing registers whose holders are dead and
// spilling to stack slots when all 13 are in use (alloc_fsm). The host polls the status
// register, then reads the allocation map back and rewrites its instructions with it.
//
// Structure:
//   avmm_slave     host bus, control/status registers, address decode
//   regalloc_seq   start -> liveness -> allocation -> done, cycle counters
//   liveness_fsm   backward pass, writes the liveness memory
//   alloc_fsm      forward pass, reads the liveness memory, writes the allocation map
//   bram_dp x3     instruction memory, liveness memory, allocation map
// Each memory has one port for the host and one for the state machines. The two state
// machines never run at the same time, so they share the machine-side ports of the
// instruction and liveness memories through a simple multiplexer selected by the
// liveness machine's busy flag.
//
// Ports are the Avalon-MM slave signals the platform interconnect would drive from the
// processor's lightweight bridge, plus a done flag (also in STATUS) usable as an
// interrupt or parallel output. avs_waitrequest is tied low: every access completes
// in one cycle, and reads return data one cycle later with avs_readdatavalid. Clocking
// is a single clock (50 MHz in the reference system) and an active-low asynchronous
// reset.
//
// MAX_INSTR and MAX_VREGS size the memories; the document gives no numbers for them.
// NUM_PHYS is the 13 general purpose registers of the ARM ISA.
module regalloc_top
  import regalloc_pkg::*;
#(
  parameter int unsigned MAX_INSTR = 64,
  parameter int unsigned MAX_VREGS = 64,
  parameter int unsigned NUM_PHYS  = NUM_GP_REGS,
  localparam int unsigned IMAW = $clog2(MAX_INSTR * WORDS_PER_INSTR),
  localparam int unsigned IW   = $clog2(MAX_INSTR + 1),
  localparam int unsigned VW   = $clog2(MAX_VREGS),
  localparam int unsigned OW   = (IMAW > VW) ? ((IMAW > 3) ? IMAW : 3) : ((VW > 3) ? VW : 3),
  localparam int unsigned AW   = OW + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] avs_address,
  input  logic          avs_read,
  input  logic          avs_write,
  input  logic [31:0]   avs_writedata,
  output logic [31:0]   avs_readdata,
  output logic          avs_readdatavalid,
  output logic          avs_waitrequest,
  output logic          done
);

  // host side
  logic            h_im_en, h_im_we, h_lv_en, h_mp_en;
  logic [IMAW-1:0] h_im_addr;
  logic [VW-1:0]   h_lv_addr, h_mp_addr;
  logic [31:0]     h_im_wdata, h_im_rdata, h_lv_rdata, h_mp_rdata;
  logic            start, busy, err;
  logic [IW-1:0]   n_instr;
  logic [31:0]     live_cycles, alloc_cycles;
  logic [15:0]     n_spill;

  // machine side
  logic            live_start, live_done, live_busy;
  logic            alloc_start, alloc_done, alloc_busy;
  logic            l_im_en, a_im_en, l_lv_we, a_lv_en, a_mp_en, a_mp_we;
  logic [IMAW-1:0] l_im_addr, a_im_addr;
  logic [VW-1:0]   l_lv_addr, a_lv_addr, a_mp_addr;
  logic [31:0]     l_lv_wdata, a_mp_wdata;
  logic [31:0]     m_im_rdata, m_lv_rdata, m_mp_rdata;
  logic            m_im_en, m_lv_en;
  logic [IMAW-1:0] m_im_addr;
  logic [VW-1:0]   m_lv_addr;

  avmm_slave #(.MAX_INSTR(MAX_INSTR), .MAX_VREGS(MAX_VREGS)) u_slave (
    .clk, .rst_n,
    .avs_address, .avs_read, .avs_write, .avs_writedata,
    .avs_readdata, .avs_readdatavalid, .avs_waitrequest,
    .im_en(h_im_en), .im_we(h_im_we), .im_addr(h_im_addr), .im_wdata(h_im_wdata),
    .im_rdata(h_im_rdata),
    .lv_en(h_lv_en), .lv_addr(h_lv_addr), .lv_rdata(h_lv_rdata),
    .mp_en(h_mp_en), .mp_addr(h_mp_addr), .mp_rdata(h_mp_rdata),
    .start, .n_instr, .busy, .done, .err,
    .live_cycles, .alloc_cycles, .n_spill
  );

  regalloc_seq u_seq (
    .clk, .rst_n, .start,
    .live_start, .live_done, .alloc_start, .alloc_done,
    .busy, .done, .live_cycles, .alloc_cycles
  );

  liveness_fsm #(.MAX_INSTR(MAX_INSTR), .MAX_VREGS(MAX_VREGS)) u_live (
    .clk, .rst_n, .start(live_start), .n_instr,
    .busy(live_busy), .done(live_done), .err,
    .im_en(l_im_en), .im_addr(l_im_addr), .im_rdata(m_im_rdata),
    .lv_we(l_lv_we), .lv_addr(l_lv_addr), .lv_wdata(l_lv_wdata)
  );

  alloc_fsm #(.MAX_INSTR(MAX_INSTR), .MAX_VREGS(MAX_VREGS), .NUM_PHYS(NUM_PHYS)) u_alloc (
    .clk, .rst_n, .start(alloc_start), .n_instr,
    .busy(alloc_busy), .done(alloc_done), .n_spill,
    .im_en(a_im_en), .im_addr(a_im_addr), .im_rdata(m_im_rdata),
    .lv_en(a_lv_en), .lv_addr(a_lv_addr), .lv_rdata(m_lv_rdata),
    .mp_en(a_mp_en), .mp_we(a_mp_we), .mp_addr(a_mp_addr), .mp_wdata(a_mp_wdata),
    .mp_rdata(m_mp_rdata)
  );

  // machine-side port sharing: the liveness machine owns the ports while it is busy
  assign m_im_en   = live_busy ? l_im_en   : a_im_en;
  assign m_im_addr = live_busy ? l_im_addr : a_im_addr;
  assign m_lv_en   = live_busy ? l_lv_we   : a_lv_en;
  assign m_lv_addr = live_busy ? l_lv_addr : a_lv_addr;

  bram_dp #(.DW(32), .DEPTH(MAX_INSTR * WORDS_PER_INSTR)) u_imem (
    .clk,
    .a_en(m_im_en), .a_we(1'b0), .a_addr(m_im_addr), .a_wdata(32'd0), .a_rdata(m_im_rdata),
    .b_en(h_im_en), .b_we(h_im_we), .b_addr(h_im_addr), .b_wdata(h_im_wdata),
    .b_rdata(h_im_rdata)
  );

  bram_dp #(.DW(32), .DEPTH(MAX_VREGS)) u_lmem (
    .clk,
    .a_en(m_lv_en), .a_we(live_busy && l_lv_we), .a_addr(m_lv_addr), .a_wdata(l_lv_wdata),
    .a_rdata(m_lv_rdata),
    .b_en(h_lv_en), .b_we(1'b0), .b_addr(h_lv_addr), .b_wdata(32'd0), .b_rdata(h_lv_rdata)
  );

  bram_dp #(.DW(32), .DEPTH(MAX_VREGS)) u_mmem (
    .clk,
    .a_en(a_mp_en), .a_we(a_mp_we), .a_addr(a_mp_addr), .a_wdata(a_mp_wdata),
    .a_rdata(m_mp_rdata),
    .b_en(h_mp_en), .b_we(1'b0), .b_addr(h_mp_addr), .b_wdata(32'd0), .b_rdata(h_mp_rdata)
  );

  // The two halves run strictly one after the other.
  assert property (@(posedge clk) disable iff (!rst_n) !(live_busy && alloc_busy))
    else $error("regalloc_top: liveness and allocation overlap");

endmodule
