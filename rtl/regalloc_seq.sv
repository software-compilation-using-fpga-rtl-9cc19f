// regalloc_seq: runs the two halves of the allocator one after the other.
//
// A start command from the host launches liveness analysis; when it finishes, register
// allocation is launched on the liveness table it produced; when that finishes, the
// done flag is raised and stays up until the next start. The sequencer also counts the
// clock cycles each half takes, so the host can read the execution time of liveness and
// of allocation separately (at 50 MHz one cycle is 20 ns).
//
// Interface:
//   start               one-cycle command from the host; ignored while busy
//   live_start/done     start pulse to and done pulse from liveness_fsm
//   alloc_start/done    start pulse to and done pulse from alloc_fsm
//   busy                high from the cycle after start until allocation is done
//   done                sticky completion flag, cleared by the next start
//   live_cycles         cycles from the liveness start pulse up to its done pulse
//   alloc_cycles        cycles from the allocation start pulse up to its done pulse
//
// Timing: the start pulses are registered, one cycle after the command or the
// liveness done pulse. The counters count the cycle of the start pulse and every cycle
// up to, not including, the cycle of the done pulse.
//
// The two-phase order follows the description of the design; the cycle counters are
// this design's way of measuring the execution times it reports.
module regalloc_seq (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        live_start,
  input  logic        live_done,
  output logic        alloc_start,
  input  logic        alloc_done,
  output logic        busy,
  output logic        done,
  output logic [31:0] live_cycles,
  output logic [31:0] alloc_cycles
);

  typedef enum logic [1:0] {S_IDLE, S_LIVE, S_ALLOC} seq_e;
  seq_e state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      live_start   <= 1'b0;
      alloc_start  <= 1'b0;
      done         <= 1'b0;
      live_cycles  <= '0;
      alloc_cycles <= '0;
    end else begin
      live_start  <= 1'b0;
      alloc_start <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q      <= S_LIVE;
          live_start   <= 1'b1;
          done         <= 1'b0;
          live_cycles  <= '0;
          alloc_cycles <= '0;
        end
        S_LIVE: begin
          if (live_done) begin
            state_q     <= S_ALLOC;
            alloc_start <= 1'b1;
          end else begin
            live_cycles <= live_cycles + 1;
          end
        end
        S_ALLOC: begin
          if (alloc_done) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            alloc_cycles <= alloc_cycles + 1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  // A phase can only report done while the sequencer is waiting for it.
  assert property (@(posedge clk) disable iff (!rst_n) live_done |-> state_q == S_LIVE)
    else $error("regalloc_seq: unexpected liveness done");
  assert property (@(posedge clk) disable iff (!rst_n) alloc_done |-> state_q == S_ALLOC)
    else $error("regalloc_seq: unexpected allocation done");

endmodule
