// blm_selftest: self-test add-on of the BLM combiner card.
//
// Holds the two self-test functions of one BLM acquisition channel side by side:
//  - instant_value_selftest: before each machine cycle, a quick cross-correlation of the
//    modulation reference with the running-sum output gives a coarse 7-bit gain
//    indication and a phase (in 1/256 of a period) to compare with the values recorded
//    at start-up, to spot gross failures (broken cable, short circuit);
//  - long_term_selftest: zero-lag correlation of the running sum with an ideal sine and
//    cosine, giving two 16-bit results from which gain and phase are tracked over months
//    to follow ageing.
// The instant value result is checked against a window of values recorded at start-up
// (iv_range_check); iv_status_ok low flags a chain that is out of order.
// Both share the 1 MHz clock, the active-low synchronous reset and the strobe that marks
// a new modulation sample. Each has its own start request and busy flag, to be driven by
// the combiner's control unit, which reads the results once busy is low. The two blocks
// can run at the same time; they share no state.
module blm_selftest
  import blm_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               new_data_strobe,
  // instant value self-test
  input  logic               iv_start,
  input  logic [DATA_W-1:0]  iv_ref_in,
  input  logic [DATA_W-1:0]  iv_rs_in,
  output logic               iv_busy,
  output logic [6:0]         iv_gain,
  output logic [ADDR_W-1:0]  iv_phase,
  input  logic [6:0]         iv_gain_min,      // start-up window of the gain indication
  input  logic [6:0]         iv_gain_max,
  input  logic [ADDR_W-1:0]  iv_phase_min,     // start-up phase window (may wrap through 0)
  input  logic [ADDR_W-1:0]  iv_phase_max,
  output logic               iv_status_valid,
  output logic               iv_status_ok,
  output logic               iv_gain_err,
  output logic               iv_phase_err,
  // long term analysis
  input  logic               lt_start,
  input  logic [DATA_W-1:0]  lt_rs_in,
  output logic               lt_busy,
  output logic signed [15:0] lt_r_cos,
  output logic signed [15:0] lt_r_sin
);

  instant_value_selftest u_instant (
    .clk, .rst_n, .start(iv_start), .new_data_strobe,
    .ref_in(iv_ref_in), .rs_in(iv_rs_in),
    .busy(iv_busy), .gain(iv_gain), .phase(iv_phase)
  );

  iv_range_check u_status (
    .clk, .rst_n, .busy(iv_busy), .gain(iv_gain), .phase(iv_phase),
    .gain_min(iv_gain_min), .gain_max(iv_gain_max),
    .phase_min(iv_phase_min), .phase_max(iv_phase_max),
    .status_valid(iv_status_valid), .status_ok(iv_status_ok),
    .gain_err(iv_gain_err), .phase_err(iv_phase_err)
  );

  long_term_selftest u_long_term (
    .clk, .rst_n, .start(lt_start), .new_data_strobe, .rs_in(lt_rs_in),
    .busy(lt_busy), .r_cos(lt_r_cos), .r_sin(lt_r_sin)
  );

endmodule
