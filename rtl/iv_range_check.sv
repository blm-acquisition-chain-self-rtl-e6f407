// iv_range_check: turns an instant value test result into a chain status flag.
//
// At each run the gain indication and the phase are compared with a window of values
// recorded at start-up (gain_min..gain_max, phase_min..phase_max). The phase is circular
// (256 steps per period), so a phase window whose phase_min is above phase_max wraps
// through zero: it then accepts phase >= phase_min or phase <= phase_max. A large failure
// of the chain (broken cable, short circuit) moves the gain or the phase outside its
// window and clears status_ok.
//
// Interface and timing: the check is made in the clock after busy falls (the results are
// valid then); status_valid, status_ok, gain_err and phase_err are registered and hold
// until the next result. Before the first result status_valid is low and status_ok is
// low. The comparison with start-up values follows the original design; the window
// form, the wrap-around rule and the busy-edge trigger are this design's choices.
module iv_range_check
  import blm_pkg::*;
#(
  parameter int unsigned GAIN_W = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              busy,          // instant value test busy flag
  input  logic [GAIN_W-1:0] gain,
  input  logic [ADDR_W-1:0] phase,
  input  logic [GAIN_W-1:0] gain_min,      // start-up window, inclusive
  input  logic [GAIN_W-1:0] gain_max,
  input  logic [ADDR_W-1:0] phase_min,
  input  logic [ADDR_W-1:0] phase_max,
  output logic              status_valid,  // a result has been checked
  output logic              status_ok,     // last result inside both windows
  output logic              gain_err,
  output logic              phase_err
);

  logic busy_q;
  logic gain_in, phase_in;

  always_comb begin
    gain_in = (gain >= gain_min) && (gain <= gain_max);
    if (phase_min <= phase_max) phase_in = (phase >= phase_min) && (phase <= phase_max);
    else                        phase_in = (phase >= phase_min) || (phase <= phase_max);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q       <= 1'b0;
      status_valid <= 1'b0;
      status_ok    <= 1'b0;
      gain_err     <= 1'b0;
      phase_err    <= 1'b0;
    end else begin
      busy_q <= busy;
      if (busy_q && !busy) begin
        status_valid <= 1'b1;
        status_ok    <= gain_in && phase_in;
        gain_err     <= !gain_in;
        phase_err    <= !phase_in;
      end
    end
  end

endmodule
