// bram_dp: true dual-port block RAM, the "memory unit" of the allocator.
//
// Three instances hold the Binary-IR instruction records, the liveness table and the
// virtual-to-physical allocation map. Each port can read or write one word per cycle.
// Reads are synchronous: the word addressed in cycle t appears on rdata in cycle t+1,
// which is how FPGA block RAM behaves. A read on a port that writes in the same cycle
// returns the old contents (read-before-write). Writes from both ports to one address in
// the same cycle are not allowed; the allocator never does this.
//
// The memory contents are not cleared by reset (block RAM cannot be); the state machines
// that read a table first write every entry they later read.
module bram_dp #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 768,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  // port A
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  // port B
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end

  // Both ports writing one address in the same cycle has no defined result.
  assert property (@(posedge clk) !(a_en && a_we && b_en && b_we && a_addr == b_addr))
    else $error("bram_dp: write collision at address %0d", a_addr);

endmodule
