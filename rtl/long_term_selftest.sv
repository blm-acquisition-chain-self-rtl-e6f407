// long_term_selftest: long term transfer-function analysis of the BLM acquisition chain.
//
// Following the pulse-rate transfer function analyser principle, the filtered running sum
// y is cross-correlated at lag zero with two ideal references of known amplitude A = 128,
// a sine and a cosine, over exactly one modulation period of N = 256 samples:
//   r_sin = (1/N) * sum y[n]*A*sin(2*pi*n/N),   r_cos = (1/N) * sum y[n]*A*cos(2*pi*n/N)
// A remote computer then forms |H| = sqrt(r_cos^2 + r_sin^2)/A^2 and
// phase = arctan(r_cos / r_sin). Because there is no sliding window, start must come when
// the stimulating sine is at its origin: the first sample taken (the one whose strobe
// arrives in the clock start is seen, or later) is multiplied by table entry 0. The
// filter runs on every strobe, so it has settled after a few periods.
//
// The running-sum input is masked to its RS_BITS least significant bits (10 was found
// enough for the chain this was tuned on), which drops the large offset; the remaining
// offset cancels because each reference sums to zero over a period. The 16-bit signed
// outputs are the accumulators divided by N (arithmetic shift by OUT_SHIFT) and saturated.
// busy rises the clock after start and falls two clocks after the filter output of the
// 256th strobe, when r_sin and r_cos hold the new results. The division by N, the output
// saturation, the strobe input and the synchronous reset are this design's choices.
// The masked-off MSBs of rs_in are deliberately unused (lint reports them as such).
module long_term_selftest
  import blm_pkg::*;
#(
  parameter int unsigned RS_BITS   = 10,   // relevant LSBs of the running-sum input
  parameter int unsigned FRAC_W    = 14,
  parameter int unsigned AMP       = 128,
  parameter int unsigned REF_W     = 9,
  parameter int unsigned OUT_W     = 16,
  parameter int unsigned OUT_SHIFT = ADDR_W
) (
  input  logic                     clk,              // 1 MHz
  input  logic                     rst_n,            // active low
  input  logic                     start,            // at the beginning of a period
  input  logic                     new_data_strobe,
  input  logic [DATA_W-1:0]        rs_in,            // running-sum data
  output logic                     busy,
  output logic signed [OUT_W-1:0]  r_cos,
  output logic signed [OUT_W-1:0]  r_sin
);

  localparam int unsigned YW    = RS_BITS + 2;
  localparam int unsigned ACC_W = YW + REF_W + ADDR_W;

  lt_state_t               state;
  logic [RS_BITS-1:0]      rs_m;
  logic signed [YW-1:0]    y;
  logic                    y_valid;
  logic [ADDR_W-1:0]       idx;
  logic signed [REF_W-1:0] sin_ref, cos_ref;
  logic signed [ACC_W-1:0] acc_sin, acc_cos;
  logic                    clear, mac_en;

  assign rs_m = rs_in[RS_BITS-1:0];

  iir_filter #(.IN_W(RS_BITS), .OUT_W(YW), .FRAC_W(FRAC_W)) u_filter (
    .clk, .rst_n, .en(new_data_strobe), .x(rs_m), .y, .y_valid
  );

  sine_rom #(.N(N_SAMPLES), .AMP(AMP), .W(REF_W)) u_rom (
    .addr(idx), .sin_q(sin_ref), .cos_q(cos_ref)
  );

  assign clear  = (state == LT_IDLE) && start;
  assign mac_en = (state == LT_RUN) && y_valid;

  lt_mac #(.IN_W(YW), .REF_W(REF_W), .N(N_SAMPLES), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n, .clear, .en(mac_en), .y, .sin_ref, .cos_ref, .acc_sin, .acc_cos
  );

  function automatic logic signed [OUT_W-1:0] scale(input logic signed [ACC_W-1:0] a);
    logic signed [ACC_W-1:0] s;
    s = a >>> OUT_SHIFT;
    if (s > ACC_W'((64'sd1 <<< (OUT_W - 1)) - 1)) return {1'b0, {(OUT_W - 1){1'b1}}};
    if (s < -ACC_W'(64'sd1 <<< (OUT_W - 1)))      return {1'b1, {(OUT_W - 1){1'b0}}};
    return OUT_W'(s);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= LT_IDLE;
      idx   <= '0;
      r_cos <= '0;
      r_sin <= '0;
    end else begin
      unique case (state)
        LT_IDLE: if (start) begin
          state <= LT_RUN;
          idx   <= '0;
        end
        LT_RUN: if (y_valid) begin
          idx <= idx + 1'b1;
          if (idx == ADDR_W'(N_SAMPLES - 1)) state <= LT_OUT;
        end
        LT_OUT: begin
          r_cos <= scale(acc_cos);
          r_sin <= scale(acc_sin);
          state <= LT_IDLE;
        end
        default: state <= LT_IDLE;
      endcase
    end
  end

  assign busy = (state != LT_IDLE);

endmodule
