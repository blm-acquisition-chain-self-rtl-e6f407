// instant_value_selftest: instant value self-test of one BLM acquisition channel.
//
// A small sine modulates the high-voltage source; this block compares that reference with
// the running-sum output of the chain. Both 16-bit inputs are masked to their REF_BITS /
// RS_BITS least significant bits (forcing the offset-carrying MSBs low to save logic),
// filtered by the same second-order low-pass IIR filter on every new_data_strobe, and on a
// start request one period (256 samples) of each filtered signal is stored in a RAM. A
// single multiply-accumulate then slides the reference over the running sum for all 256
// circular lags (256 x 256 clocks). The lag of the correlation peak is the phase
// (multiply by 360/256 for degrees) and the spread between the highest and lowest
// correlation value, scaled to 7 bits, is the gain indication.
//
// Timing: the filters run on every strobe, also when no test is running, so they have
// settled (about two periods) by the time start comes. busy rises the clock after start
// and falls when gain and phase are valid: one period of strobes plus 256*256 + 4 clocks.
// The outputs hold their values until the next test cycle completes.
// The original design gives the structure (filters, two RAMs, one MAC, peak and min search,
// subtractor, Moore controller); the output scaling, the 8-bit phase word, the strobe
// input timing and the synchronous active-low reset are this design's choices.
module instant_value_selftest
  import blm_pkg::*;
#(
  parameter int unsigned REF_BITS   = DATA_W,   // relevant LSBs of the reference input
  parameter int unsigned RS_BITS    = DATA_W,   // relevant LSBs of the running-sum input
  parameter int unsigned FRAC_W     = 14,
  parameter int unsigned GAIN_W     = 7,
  parameter int unsigned GAIN_SHIFT = 20
) (
  input  logic               clk,              // 1 MHz
  input  logic               rst_n,
  input  logic               start,
  input  logic               new_data_strobe,  // a new sine value / running sum is present
  input  logic [DATA_W-1:0]  ref_in,           // reference (stimulus)
  input  logic [DATA_W-1:0]  rs_in,            // running-sum logging data
  output logic               busy,
  output logic [GAIN_W-1:0]  gain,
  output logic [ADDR_W-1:0]  phase
);

  localparam int unsigned W = DATA_W + 2;   // filtered sample width (DC gain 1.05 plus overshoot)

  logic [DATA_W-1:0]   ref_m, rs_m;
  logic signed [W-1:0] ref_f, rs_f;
  logic                ref_v, rs_v;
  logic                we, corr_start, corr_done, corr_running;
  logic [ADDR_W-1:0]   wr_addr, ref_addr, rs_addr;
  logic [W-1:0]        ref_q, rs_q;
  iv_state_t           state;

  localparam logic [DATA_W-1:0] REF_MASK = DATA_W'((64'd1 << REF_BITS) - 1);
  localparam logic [DATA_W-1:0] RS_MASK  = DATA_W'((64'd1 << RS_BITS) - 1);

  assign ref_m = ref_in & REF_MASK;
  assign rs_m  = rs_in & RS_MASK;

  iir_filter #(.IN_W(DATA_W), .OUT_W(W), .FRAC_W(FRAC_W)) u_ref_filter (
    .clk, .rst_n, .en(new_data_strobe), .x(ref_m), .y(ref_f), .y_valid(ref_v)
  );

  iir_filter #(.IN_W(DATA_W), .OUT_W(W), .FRAC_W(FRAC_W)) u_rs_filter (
    .clk, .rst_n, .en(new_data_strobe), .x(rs_m), .y(rs_f), .y_valid(rs_v)
  );

  iv_control #(.N(N_SAMPLES)) u_control (
    .clk, .rst_n, .start, .sample_valid(ref_v), .corr_done,
    .busy, .we, .wr_addr, .corr_start, .state
  );

  sample_ram #(.WIDTH(W), .DEPTH(N_SAMPLES)) u_ref_ram (
    .clk, .we, .wr_addr, .wr_data(ref_f), .rd_addr(ref_addr), .rd_data(ref_q)
  );

  sample_ram #(.WIDTH(W), .DEPTH(N_SAMPLES)) u_rs_ram (
    .clk, .we, .wr_addr, .wr_data(rs_f), .rd_addr(rs_addr), .rd_data(rs_q)
  );

  iv_correlator #(.WIDTH(W), .N(N_SAMPLES), .GAIN_W(GAIN_W), .GAIN_SHIFT(GAIN_SHIFT)) u_corr (
    .clk, .rst_n, .start(corr_start),
    .ref_addr, .rs_addr, .ref_data(ref_q), .rs_data(rs_q),
    .running(corr_running), .done(corr_done), .gain, .phase
  );

  // Both filters share the strobe, so their outputs are always valid together.
  assert property (@(posedge clk) disable iff (!rst_n) ref_v == rs_v)
    else $error("instant_value_selftest: filter outputs out of step");
  // The correlator only runs while the controller is processing.
  assert property (@(posedge clk) disable iff (!rst_n) corr_running |-> state inside {IV_START, IV_PROC})
    else $error("instant_value_selftest: correlator running outside processing");

endmodule
