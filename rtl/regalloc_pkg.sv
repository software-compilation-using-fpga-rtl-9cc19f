// regalloc_pkg: types and constants shared by the hardware register allocator.
//
// The allocator works on a fixed-length binary form of ARM-like instructions in which
// every instruction occupies 48 bytes, i.e. twelve 32-bit words of the host-visible
// instruction memory. Only four of those words matter to liveness and allocation: the
// opcode word and the three operand words (destination, source 1, source 2). The
// remaining words carry an immediate, a branch target and reserved space so that the
// record keeps the 48-byte size.
//
// Word layout of one instruction record (this layout is this design's own choice; the
// 48-byte size and the field list follow the description of the format):
//   word 0  : opcode (opcode_e in bits [7:0])
//   word 1  : destination operand   (operand_t)
//   word 2  : source operand 1      (operand_t)
//   word 3  : source operand 2      (operand_t)
//   word 4  : immediate constant
//   word 5  : branch target (instruction index) for control-flow instructions
//   word 6-11 : reserved, written as zero
//
// An operand word holds a register kind in bits [31:30] and a register number in bits
// [15:0]. Kind NONE marks an absent operand. After allocation a virtual register is
// replaced by a PHYS register (r0..r12) or by a STACK slot number.
package regalloc_pkg;

  // Bytes and 32-bit words per Binary-IR instruction record.
  localparam int unsigned INSTR_BYTES     = 48;
  localparam int unsigned WORDS_PER_INSTR = INSTR_BYTES / 4;

  // Word offsets inside a record.
  localparam int unsigned W_OPCODE = 0;
  localparam int unsigned W_DST    = 1;
  localparam int unsigned W_SRC1   = 2;
  localparam int unsigned W_SRC2   = 3;
  localparam int unsigned W_IMM    = 4;
  localparam int unsigned W_TARGET = 5;

  // General purpose ARM registers available to the allocator (r0..r12).
  localparam int unsigned NUM_GP_REGS = 13;

  // Instruction opcodes of the ARM subset seen in the test programs.
  typedef enum logic [7:0] {
    OP_NOP   = 8'd0,
    OP_MOV   = 8'd1,
    OP_ADD   = 8'd2,
    OP_SUB   = 8'd3,
    OP_MUL   = 8'd4,
    OP_SDIV  = 8'd5,
    OP_CMP   = 8'd6,
    OP_LDR   = 8'd7,
    OP_STR   = 8'd8,
    OP_B     = 8'd9,
    OP_BCOND = 8'd10,
    OP_BL    = 8'd11,
    OP_RET   = 8'd12
  } opcode_e;

  // Register kinds: absent, physical, virtual or stack space.
  typedef enum logic [1:0] {
    RK_NONE  = 2'd0,
    RK_PHYS  = 2'd1,
    RK_VIRT  = 2'd2,
    RK_STACK = 2'd3
  } reg_kind_e;

  // One operand word.
  typedef struct packed {
    reg_kind_e   kind;
    logic [13:0] rsvd;
    logic [15:0] num;
  } operand_t;

  // The fields of a record that the allocator and the tools use.
  typedef struct packed {
    opcode_e     opcode;
    operand_t    dst;
    operand_t    src1;
    operand_t    src2;
    logic [31:0] imm;
    logic [31:0] target;
  } instr_t;

  // Liveness table entry: valid flag and index of the last instruction touching the register.
  typedef struct packed {
    logic        valid;
    logic [14:0] rsvd;
    logic [15:0] last;
  } live_t;

  // Allocation map entry: kind is RK_PHYS (num = r0..r12), RK_STACK (num = slot) or
  // RK_NONE when the virtual register was never allocated.
  typedef operand_t map_t;

  function automatic operand_t mk_op(reg_kind_e k, int unsigned n);
    operand_t o;
    o.kind = k;
    o.rsvd = '0;
    o.num  = 16'(n);
    return o;
  endfunction

endpackage
