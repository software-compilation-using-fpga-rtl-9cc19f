// liveness_fsm: liveness analysis over the Binary-IR instruction memory.
//
// The analysis walks the instructions backwards, from the last one to the first, and
// for every virtual-register operand remembers the index of the instruction where that
// register is met first on the way back: that is the last instruction that reads or
// writes it, the end of its live range. When the walk is over, the table of ends is
// written, one entry per cycle, to the liveness memory, where the allocation state
// machine reads it.
//
// The machine has eleven states, as in the description of the hardware: idle, init,
// a check state and an extract state for each of the three operands (destination,
// source 1, source 2), next-instruction, the write-out loop and done. A check state
// looks at the operand word and decides whether it is a virtual register; the extract
// state takes its number and records the end if the register has not been seen yet.
// Every state issues at most one memory read or one memory write.
//
// Interface:
//   start/n_instr : a one-cycle start pulse and the number of instructions in memory
//   busy, done    : busy while running; done pulses for one cycle at the end
//   err           : sticky until the next start; set when a virtual register number is
//                   not below MAX_VREGS (that operand is then ignored)
//   im_*          : read port of the instruction memory (synchronous, one cycle latency)
//   lv_*          : write port of the liveness memory; entry v = live_t {valid, last}
//
// Timing: the instruction memory address is produced from the next state, so the word
// a state inspects is on im_rdata while that state is current. A run takes
//   2 + sum over instructions of (4 + virtual operands) + MAX_VREGS cycles
// from the start cycle to the done cycle.
//
// Choices of this design, where the description is silent: the walk is one linear
// backward pass over the instruction order (as in the pseudocode), the ends are kept in
// registers during the pass, operands of other kinds (physical, stack) are ignored, and
// an entry of a register that never occurs is written with valid = 0.
module liveness_fsm
  import regalloc_pkg::*;
#(
  parameter int unsigned MAX_INSTR = 64,
  parameter int unsigned MAX_VREGS = 64,
  localparam int unsigned IMAW = $clog2(MAX_INSTR * WORDS_PER_INSTR),
  localparam int unsigned IW   = $clog2(MAX_INSTR + 1),
  localparam int unsigned VW   = $clog2(MAX_VREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [IW-1:0]   n_instr,
  output logic            busy,
  output logic            done,
  output logic            err,
  // instruction memory read port
  output logic            im_en,
  output logic [IMAW-1:0] im_addr,
  input  logic [31:0]     im_rdata,
  // liveness memory write port
  output logic            lv_we,
  output logic [VW-1:0]   lv_addr,
  output logic [31:0]     lv_wdata
);

  typedef enum logic [3:0] {
    L_IDLE,
    L_INIT,
    L_CHK_DST,
    L_EXT_DST,
    L_CHK_SRC1,
    L_EXT_SRC1,
    L_CHK_SRC2,
    L_EXT_SRC2,
    L_NEXT,
    L_WRITE,
    L_DONE
  } lstate_e;

  lstate_e             state_q, state_d;
  logic [IW-1:0]       idx_q, idx_d;      // current instruction index
  logic [VW-1:0]       vidx_q, vidx_d;    // write-out loop index
  logic [MAX_VREGS-1:0] seen_q;
  logic [IW-1:0]       ends_q [MAX_VREGS];

  operand_t            op;
  logic                op_virt, op_range;
  logic [VW-1:0]       op_v;

  assign op       = operand_t'(im_rdata);
  assign op_virt  = (op.kind == RK_VIRT);
  assign op_range = (32'(op.num) < MAX_VREGS);
  assign op_v     = VW'(op.num);

  // next-state logic
  always_comb begin
    state_d = state_q;
    idx_d   = idx_q;
    vidx_d  = vidx_q;
    unique case (state_q)
      L_IDLE:     if (start) state_d = L_INIT;
      L_INIT: begin
        vidx_d = '0;
        if (n_instr == '0) begin
          state_d = L_WRITE;
        end else begin
          idx_d   = n_instr - 1'b1;
          state_d = L_CHK_DST;
        end
      end
      L_CHK_DST:  state_d = (op_virt && op_range) ? L_EXT_DST  : L_CHK_SRC1;
      L_EXT_DST:  state_d = L_CHK_SRC1;
      L_CHK_SRC1: state_d = (op_virt && op_range) ? L_EXT_SRC1 : L_CHK_SRC2;
      L_EXT_SRC1: state_d = L_CHK_SRC2;
      L_CHK_SRC2: state_d = (op_virt && op_range) ? L_EXT_SRC2 : L_NEXT;
      L_EXT_SRC2: state_d = L_NEXT;
      L_NEXT: begin
        if (idx_q == '0) begin
          state_d = L_WRITE;
        end else begin
          idx_d   = idx_q - 1'b1;
          state_d = L_CHK_DST;
        end
      end
      L_WRITE: begin
        if (32'(vidx_q) == MAX_VREGS - 1) state_d = L_DONE;
        else                              vidx_d  = vidx_q + 1'b1;
      end
      L_DONE:     state_d = L_IDLE;
      default:    state_d = L_IDLE;
    endcase
  end

  // Instruction memory address from the next state: the word arrives while that
  // state is current.
  always_comb begin
    int unsigned field;
    unique case (state_d)
      L_CHK_DST,  L_EXT_DST:  field = W_DST;
      L_CHK_SRC1, L_EXT_SRC1: field = W_SRC1;
      L_CHK_SRC2, L_EXT_SRC2: field = W_SRC2;
      default:                field = W_OPCODE;
    endcase
    im_en   = (state_d inside {L_CHK_DST, L_EXT_DST, L_CHK_SRC1, L_EXT_SRC1,
                               L_CHK_SRC2, L_EXT_SRC2});
    im_addr = IMAW'(32'(idx_d) * WORDS_PER_INSTR + field);
  end

  // Liveness table write-out.
  always_comb begin
    live_t e;
    e.valid  = seen_q[vidx_q];
    e.rsvd   = '0;
    e.last   = 16'(ends_q[vidx_q]);
    lv_we    = (state_q == L_WRITE);
    lv_addr  = vidx_q;
    lv_wdata = e;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= L_IDLE;
      idx_q   <= '0;
      vidx_q  <= '0;
      seen_q  <= '0;
      err     <= 1'b0;
    end else begin
      state_q <= state_d;
      idx_q   <= idx_d;
      vidx_q  <= vidx_d;
      if (state_q == L_INIT) seen_q <= '0;
      if (state_q == L_IDLE && start) err <= 1'b0;
      if (state_q inside {L_CHK_DST, L_CHK_SRC1, L_CHK_SRC2} && op_virt && !op_range)
        err <= 1'b1;
      if (state_q inside {L_EXT_DST, L_EXT_SRC1, L_EXT_SRC2} && !seen_q[op_v])
        seen_q[op_v] <= 1'b1;
    end
  end

  // The ends table needs no reset: an entry is read only when its seen bit is set.
  always_ff @(posedge clk) begin
    if (state_q inside {L_EXT_DST, L_EXT_SRC1, L_EXT_SRC2} && !seen_q[op_v])
      ends_q[op_v] <= idx_q;
  end

  assign busy = (state_q != L_IDLE);
  assign done = (state_q == L_DONE);

endmodule
