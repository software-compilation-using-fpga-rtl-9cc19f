// alloc_fsm: maps virtual registers to the 13 general purpose ARM registers.
//
// The allocator walks the instructions forwards. For each operand that names a virtual
// register it first looks the register up in the allocation map; if it has no mapping
// yet, it takes the lowest-numbered physical register that is free at the current
// instruction and keeps that register busy up to the end of the virtual register's live
// range, read from the liveness memory written by liveness_fsm. A physical register is
// free again once the current instruction index has passed that end, so registers are
// reused by later virtual registers. When all NUM_PHYS registers are busy the virtual
// register is mapped to a fresh stack slot instead (a spill).
//
// The state machine extends the liveness machine: a check and an extract state for each
// of destination, source 1 and source 2, plus four states that do the allocation proper:
//   A_MAPPED   is this virtual register mapped already? (reads the map)
//   A_ANY_FREE is any physical register free? (reads the live-range end)
//   A_FIND     which free register is next in line (the lowest numbered one)
//   A_RECORD   write the mapping (physical register or stack slot)
// Before the walk, A_CLEAR writes an empty entry to every map address.
//
// Interface:
//   start/n_instr : one-cycle start pulse, number of instructions in memory
//   busy, done    : busy while running; done pulses for one cycle at the end
//   n_spill       : stack slots used by the last run
//   im_*          : instruction memory read port (synchronous, one cycle latency)
//   lv_*          : liveness memory read port (synchronous, one cycle latency)
//   mp_*          : allocation map port; entry v = map_t {kind, num}
//
// Timing: memory addresses come from the next state, so the word a state inspects is
// on the read data while that state is current. A run takes
//   1 + MAX_VREGS + sum over instructions of (4 + 2 per virtual operand)
//     + 2 per spill + 3 per physical register allocation
// cycles from the start cycle to the done cycle.
//
// Choices of this design, where the description is silent: a register is free at
// instruction i when its holder's range ended before i (so a destination never shares
// a register with a source whose range ends at the same instruction), the lowest free
// register is taken, each spilled virtual register gets its own stack slot, and
// operands that are already physical registers or stack slots are left alone.
module alloc_fsm
  import regalloc_pkg::*;
#(
  parameter int unsigned MAX_INSTR = 64,
  parameter int unsigned MAX_VREGS = 64,
  parameter int unsigned NUM_PHYS  = NUM_GP_REGS,
  localparam int unsigned IMAW = $clog2(MAX_INSTR * WORDS_PER_INSTR),
  localparam int unsigned IW   = $clog2(MAX_INSTR + 1),
  localparam int unsigned VW   = $clog2(MAX_VREGS),
  localparam int unsigned PW   = (NUM_PHYS > 1) ? $clog2(NUM_PHYS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [IW-1:0]   n_instr,
  output logic            busy,
  output logic            done,
  output logic [15:0]     n_spill,
  // instruction memory read port
  output logic            im_en,
  output logic [IMAW-1:0] im_addr,
  input  logic [31:0]     im_rdata,
  // liveness memory read port
  output logic            lv_en,
  output logic [VW-1:0]   lv_addr,
  input  logic [31:0]     lv_rdata,
  // allocation map read/write port
  output logic            mp_en,
  output logic            mp_we,
  output logic [VW-1:0]   mp_addr,
  output logic [31:0]     mp_wdata,
  input  logic [31:0]     mp_rdata
);

  typedef enum logic [3:0] {
    A_IDLE,
    A_CLEAR,
    A_CHK_DST,
    A_EXT_DST,
    A_CHK_SRC1,
    A_EXT_SRC1,
    A_CHK_SRC2,
    A_EXT_SRC2,
    A_MAPPED,
    A_ANY_FREE,
    A_FIND,
    A_RECORD,
    A_NEXT,
    A_DONE
  } astate_e;

  // Which operand the allocation states are working on, to know where to go back to.
  typedef enum logic [1:0] {F_DST, F_SRC1, F_SRC2} field_e;

  astate_e              state_q, state_d;
  field_e               fld_q, fld_d;
  logic [IW-1:0]        idx_q, idx_d;     // current instruction
  logic [VW-1:0]        v_q, v_d;         // current virtual register / clear index
  logic [IW-1:0]        end_q;            // end of the current register's live range
  logic                 spill_q;          // no physical register was free
  logic [PW-1:0]        cand_q;           // register picked by A_FIND
  logic [15:0]          slot_q;           // next free stack slot

  // physical register table: busy flag and end of the holder's range
  logic [NUM_PHYS-1:0]  pbusy_q;
  logic [IW-1:0]        puntil_q [NUM_PHYS];
  logic [NUM_PHYS-1:0]  pfree;
  logic [PW-1:0]        pfirst;

  operand_t op;
  map_t     mentry;
  live_t    lentry;
  logic     op_alloc;   // operand is a virtual register the map can hold

  assign op       = operand_t'(im_rdata);
  assign mentry   = map_t'(mp_rdata);
  assign lentry   = live_t'(lv_rdata);
  assign op_alloc = (op.kind == RK_VIRT) && (32'(op.num) < MAX_VREGS);

  always_comb begin
    for (int r = 0; r < NUM_PHYS; r++)
      pfree[r] = !pbusy_q[r] || (puntil_q[r] < idx_q);
  end

  always_comb begin
    pfirst = '0;
    for (int r = NUM_PHYS - 1; r >= 0; r--)
      if (pfree[r]) pfirst = PW'(r);
  end

  // Where to continue after finishing the operand in field f.
  function automatic astate_e after(field_e f);
    unique case (f)
      F_DST:   return A_CHK_SRC1;
      F_SRC1:  return A_CHK_SRC2;
      default: return A_NEXT;
    endcase
  endfunction

  always_comb begin
    state_d = state_q;
    fld_d   = fld_q;
    idx_d   = idx_q;
    v_d     = v_q;
    unique case (state_q)
      A_IDLE: if (start) begin
        v_d     = '0;
        state_d = A_CLEAR;
      end
      A_CLEAR: begin
        if (32'(v_q) == MAX_VREGS - 1) begin
          idx_d   = '0;
          state_d = (n_instr == '0) ? A_DONE : A_CHK_DST;
        end else begin
          v_d = v_q + 1'b1;
        end
      end
      A_CHK_DST:  begin fld_d = F_DST;  state_d = op_alloc ? A_EXT_DST  : A_CHK_SRC1; end
      A_CHK_SRC1: begin fld_d = F_SRC1; state_d = op_alloc ? A_EXT_SRC1 : A_CHK_SRC2; end
      A_CHK_SRC2: begin fld_d = F_SRC2; state_d = op_alloc ? A_EXT_SRC2 : A_NEXT;     end
      A_EXT_DST, A_EXT_SRC1, A_EXT_SRC2: begin
        v_d     = VW'(op.num);
        state_d = A_MAPPED;
      end
      A_MAPPED:   state_d = (mentry.kind != RK_NONE) ? after(fld_q) : A_ANY_FREE;
      A_ANY_FREE: state_d = (|pfree) ? A_FIND : A_RECORD;
      A_FIND:     state_d = A_RECORD;
      A_RECORD:   state_d = after(fld_q);
      A_NEXT: begin
        if (32'(idx_q) + 1 >= 32'(n_instr)) begin
          state_d = A_DONE;
        end else begin
          idx_d   = idx_q + 1'b1;
          state_d = A_CHK_DST;
        end
      end
      A_DONE:  state_d = A_IDLE;
      default: state_d = A_IDLE;
    endcase
  end

  // Memory ports, addressed from the next state.
  always_comb begin
    int unsigned field;
    map_t        w;
    unique case (state_d)
      A_CHK_DST,  A_EXT_DST:  field = W_DST;
      A_CHK_SRC1, A_EXT_SRC1: field = W_SRC1;
      A_CHK_SRC2, A_EXT_SRC2: field = W_SRC2;
      default:                field = W_OPCODE;
    endcase
    im_en   = (state_d inside {A_CHK_DST, A_EXT_DST, A_CHK_SRC1, A_EXT_SRC1,
                               A_CHK_SRC2, A_EXT_SRC2});
    im_addr = IMAW'(32'(idx_d) * WORDS_PER_INSTR + field);

    lv_en   = (state_d == A_ANY_FREE);
    lv_addr = v_d;

    w = spill_q ? mk_op(RK_STACK, 32'(slot_q)) : mk_op(RK_PHYS, 32'(cand_q));
    if (state_q == A_CLEAR) begin
      mp_en    = 1'b1;
      mp_we    = 1'b1;
      mp_addr  = v_q;
      mp_wdata = '0;
    end else if (state_q == A_RECORD) begin
      mp_en    = 1'b1;
      mp_we    = 1'b1;
      mp_addr  = v_q;
      mp_wdata = w;
    end else begin
      mp_en    = (state_d == A_MAPPED);
      mp_we    = 1'b0;
      mp_addr  = v_d;
      mp_wdata = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= A_IDLE;
      fld_q   <= F_DST;
      idx_q   <= '0;
      v_q     <= '0;
      end_q   <= '0;
      spill_q <= 1'b0;
      cand_q  <= '0;
      slot_q  <= '0;
      pbusy_q <= '0;
    end else begin
      state_q <= state_d;
      fld_q   <= fld_d;
      idx_q   <= idx_d;
      v_q     <= v_d;
      unique case (state_q)
        A_IDLE: if (start) begin
          pbusy_q <= '0;
          slot_q  <= '0;
        end
        A_ANY_FREE: begin
          end_q   <= lentry.valid ? IW'(lentry.last) : idx_q;
          spill_q <= ~(|pfree);
        end
        A_FIND: cand_q <= pfirst;
        A_RECORD: begin
          if (spill_q) begin
            slot_q <= slot_q + 1'b1;
          end else begin
            pbusy_q[cand_q] <= 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state_q == A_RECORD && !spill_q) puntil_q[cand_q] <= end_q;
  end

  assign busy    = (state_q != A_IDLE);
  assign done    = (state_q == A_DONE);
  assign n_spill = slot_q;

  // A mapping is only recorded for a register that was looked up and found unmapped.
  assert property (@(posedge clk) disable iff (!rst_n)
                   state_q == A_RECORD |-> $past(state_q) inside {A_ANY_FREE, A_FIND})
    else $error("alloc_fsm: record without lookup");

endmodule
