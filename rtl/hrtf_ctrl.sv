// hrtf_ctrl: state controller of the HRTF convolution.
//
// The convolution uses one multiplier per ear and walks the taps in turn, so
// a state machine sequences it. When a new sample pair arrives (start) the
// controller shifts it into the sample chain and clears the accumulators,
// then issues the tap indices 0..TAPS-1 on consecutive cycles, waits one
// cycle for the last product to be added, and raises done for one cycle,
// which tells the output stage that the sums are complete.
//
// States: IDLE -> RUN (TAPS cycles) -> LAST (1 cycle) -> DONE (1 cycle) -> IDLE.
//
// Interface and timing:
//   start  : one-cycle pulse with a new sample; accepted only in IDLE.
//   shift  : high in the cycle start is accepted: the chain shifts at its end.
//   clr    : high in the same cycle: accumulators are cleared.
//   tap    : coefficient/sample index to read, valid while issue is high.
//   issue  : high for the TAPS cycles of RUN.
//   done   : high for one cycle, LATENCY = TAPS + 2 cycles after the cycle in
//            which start was accepted.
//   busy   : high outside IDLE.
// A start while busy is dropped; at 44.1 kHz and a 50 MHz clock a sample
// arrives only every ~1134 cycles, so that does not happen in operation.
// The use of a state machine and of a done signal follows the design
// description; the exact states and the one-multiplier-per-ear schedule are
// this design's choices.
module hrtf_ctrl
  import spatial_pkg::*;
#(
  parameter int unsigned N_TAPS = TAPS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       shift,
  output logic                       clr,
  output logic [$clog2(N_TAPS)-1:0]  tap,
  output logic                       issue,
  output logic                       done,
  output logic                       busy
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_LAST, S_DONE} state_e;

  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      tap   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          tap   <= '0;
        end
        S_RUN: begin
          if (tap == $clog2(N_TAPS)'(N_TAPS - 1)) state <= S_LAST;
          tap <= tap + 1'b1;
        end
        S_LAST: state <= S_DONE;
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    shift = (state == S_IDLE) && start;
    clr   = shift;
    issue = (state == S_RUN);
    done  = (state == S_DONE);
    busy  = (state != S_IDLE);
  end

endmodule
