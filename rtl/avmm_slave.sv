// avmm_slave: host access to the register allocator over a 32-bit Avalon-MM slave.
//
// The host processor reaches the FPGA through its lightweight 32-bit bridge, which
// presents each access as an Avalon memory-mapped transfer. This slave splits its word
// address space into four regions selected by the two top address bits:
//   region 0  control and status registers
//   region 1  instruction memory, 12 words per 48-byte Binary-IR record (read/write)
//   region 2  liveness table, one live_t word per virtual register (read only)
//   region 3  allocation map, one map_t word per virtual register (read only)
// Control and status registers (word offset in region 0):
//   0 CTRL          write bit 0 = 1 to start liveness then allocation; reads 0
//   1 STATUS        bit 0 busy, bit 1 done (sticky until next start), bit 2 error
//   2 N_INSTR       number of instructions to process (read/write, saturates at MAX_INSTR)
//   3 LIVE_CYCLES   clock cycles of the last liveness run
//   4 ALLOC_CYCLES  clock cycles of the last allocation run
//   5 N_SPILL       stack slots used by the last allocation run
//   others          read 0
//
// Timing: no wait states (waitrequest is always low) and a fixed read latency of one
// cycle: readdata and readdatavalid come the cycle after read. Writes take effect at the
// clock edge that samples them. The host should not write the instruction memory or
// N_INSTR while STATUS.busy is set.
//
// The bus type and width follow the description of the system (Avalon-MM slave behind
// the 32-bit lightweight bridge); the register map and region split are this design's.
module avmm_slave
  import regalloc_pkg::*;
#(
  parameter int unsigned MAX_INSTR = 64,
  parameter int unsigned MAX_VREGS = 64,
  localparam int unsigned IMAW = $clog2(MAX_INSTR * WORDS_PER_INSTR),
  localparam int unsigned IW   = $clog2(MAX_INSTR + 1),
  localparam int unsigned VW   = $clog2(MAX_VREGS),
  localparam int unsigned OW   = (IMAW > VW) ? ((IMAW > 3) ? IMAW : 3) : ((VW > 3) ? VW : 3),
  localparam int unsigned AW   = OW + 2
) (
  input  logic            clk,
  input  logic            rst_n,
  // Avalon-MM slave
  input  logic [AW-1:0]   avs_address,
  input  logic            avs_read,
  input  logic            avs_write,
  input  logic [31:0]     avs_writedata,
  output logic [31:0]     avs_readdata,
  output logic            avs_readdatavalid,
  output logic            avs_waitrequest,
  // instruction memory, host port
  output logic            im_en,
  output logic            im_we,
  output logic [IMAW-1:0] im_addr,
  output logic [31:0]     im_wdata,
  input  logic [31:0]     im_rdata,
  // liveness table, host read port
  output logic            lv_en,
  output logic [VW-1:0]   lv_addr,
  input  logic [31:0]     lv_rdata,
  // allocation map, host read port
  output logic            mp_en,
  output logic [VW-1:0]   mp_addr,
  input  logic [31:0]     mp_rdata,
  // control and status
  output logic            start,
  output logic [IW-1:0]   n_instr,
  input  logic            busy,
  input  logic            done,
  input  logic            err,
  input  logic [31:0]     live_cycles,
  input  logic [31:0]     alloc_cycles,
  input  logic [15:0]     n_spill
);

  typedef enum logic [1:0] {R_CSR, R_INSTR, R_LIVE, R_MAP} region_e;

  localparam int unsigned CSR_CTRL   = 0;
  localparam int unsigned CSR_STATUS = 1;
  localparam int unsigned CSR_NINSTR = 2;
  localparam int unsigned CSR_LCYC   = 3;
  localparam int unsigned CSR_ACYC   = 4;
  localparam int unsigned CSR_NSPILL = 5;

  region_e       region;
  logic [OW-1:0] offs;
  region_e       rregion_q;
  logic [31:0]   csr_rdata, csr_q;
  logic          rvalid_q;

  assign region = region_e'(avs_address[AW-1 -: 2]);
  assign offs   = avs_address[OW-1:0];

  // memory ports
  assign im_en    = (avs_read || avs_write) && region == R_INSTR;
  assign im_we    = avs_write && region == R_INSTR;
  assign im_addr  = IMAW'(offs);
  assign im_wdata = avs_writedata;
  assign lv_en    = avs_read && region == R_LIVE;
  assign lv_addr  = VW'(offs);
  assign mp_en    = avs_read && region == R_MAP;
  assign mp_addr  = VW'(offs);

  // CSR read mux
  always_comb begin
    unique case (32'(offs))
      CSR_STATUS: csr_rdata = {29'd0, err, done, busy};
      CSR_NINSTR: csr_rdata = 32'(n_instr);
      CSR_LCYC:   csr_rdata = live_cycles;
      CSR_ACYC:   csr_rdata = alloc_cycles;
      CSR_NSPILL: csr_rdata = {16'd0, n_spill};
      default:    csr_rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start     <= 1'b0;
      n_instr   <= '0;
      rregion_q <= R_CSR;
      csr_q     <= '0;
      rvalid_q  <= 1'b0;
    end else begin
      start    <= 1'b0;
      rvalid_q <= avs_read;
      if (avs_read) begin
        rregion_q <= region;
        csr_q     <= csr_rdata;
      end
      if (avs_write && region == R_CSR) begin
        if (32'(offs) == CSR_CTRL && avs_writedata[0]) start <= 1'b1;
        if (32'(offs) == CSR_NINSTR)
          n_instr <= (avs_writedata > MAX_INSTR) ? IW'(MAX_INSTR) : IW'(avs_writedata);
      end
    end
  end

  always_comb begin
    unique case (rregion_q)
      R_INSTR: avs_readdata = im_rdata;
      R_LIVE:  avs_readdata = lv_rdata;
      R_MAP:   avs_readdata = mp_rdata;
      default: avs_readdata = csr_q;
    endcase
  end

  assign avs_readdatavalid = rvalid_q;
  assign avs_waitrequest   = 1'b0;

  // Avalon-MM: a master never reads and writes in the same transfer.
  assert property (@(posedge clk) disable iff (!rst_n) !(avs_read && avs_write))
    else $error("avmm_slave: read and write asserted together");

endmodule
