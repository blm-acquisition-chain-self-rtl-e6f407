// iir_filter: second-order Butterworth-like low-pass IIR filter, one sample per strobe.
//
// Difference equation (coefficients in Q2.14, see blm_pkg):
//   y[n] = ( B0*(x[n] + 2x[n-1] + x[n-2]) - A1*y[n-1] - A2*y[n-2] ) / 2^14
// The numerator z^-2 + 2z^-1 + 1 and the denominator built from b1, b2 and C follow the
// bilinear-transform filter with its cut-off fixed at twice the modulation frequency for
// 256 samples per period. The input is an unsigned sample; the result is signed.
// The coefficients are 16-bit words as in the original filter. The two output history
// registers carry FRAC_W extra fractional bits on top of the OUT_W integer bits: with the
// cut-off this low (pole radius about 0.966) a purely integer history would let the
// truncation error grow by roughly 1/(1+A1+A2) = 430 LSBs. That is this design's choice.
//
// Interface: x is sampled when en is high; y and y_valid are registered, so y_valid pulses
// one clock after en and y then holds until the next sample. Reset (rst_n low,
// synchronous) clears the history. Arithmetic is signed and saturating on the history.
module iir_filter
  import blm_pkg::*;
#(
  parameter int unsigned IN_W   = DATA_W,      // unsigned input sample width
  parameter int unsigned OUT_W  = IN_W + 2,    // signed output width (integer part)
  parameter int unsigned FRAC_W = 14,          // extra fractional bits of the history
  parameter logic signed [COEF_W-1:0] B0 = FILT_B0,
  parameter logic signed [COEF_W-1:0] A1 = FILT_A1,
  parameter logic signed [COEF_W-1:0] A2 = FILT_A2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,       // new input sample strobe
  input  logic [IN_W-1:0]         x,        // input sample (unsigned)
  output logic signed [OUT_W-1:0] y,        // filtered sample
  output logic                    y_valid   // one-cycle pulse, y updated
);

  localparam int unsigned YW    = OUT_W + FRAC_W;       // history word
  localparam int unsigned NUM_W = IN_W + 3;             // x + 2x1 + x2, signed
  localparam int unsigned ACC_W = COEF_W + YW + 3;

  logic [IN_W-1:0]        x1, x2;
  logic signed [YW-1:0]   y1, y2;

  logic signed [NUM_W-1:0] num;
  logic signed [ACC_W-1:0] acc, acc_rnd;
  logic signed [ACC_W-1:0] y_full;
  logic signed [YW-1:0]    y_new;

  localparam logic signed [ACC_W-1:0] Y_MAX = ACC_W'((64'sd1 <<< (YW - 1)) - 1);
  localparam logic signed [ACC_W-1:0] Y_MIN = -ACC_W'(64'sd1 <<< (YW - 1));

  always_comb begin
    num     = NUM_W'(x) + (NUM_W'(x1) <<< 1) + NUM_W'(x2);
    acc     = ((ACC_W'(B0) * ACC_W'(num)) <<< FRAC_W)
            - ACC_W'(A1) * ACC_W'(y1)
            - ACC_W'(A2) * ACC_W'(y2);
    acc_rnd = acc + ACC_W'(1 <<< (COEF_FRAC - 1));
    y_full  = acc_rnd >>> COEF_FRAC;
    if (y_full > Y_MAX)      y_new = YW'(Y_MAX);
    else if (y_full < Y_MIN) y_new = YW'(Y_MIN);
    else                     y_new = YW'(y_full);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1      <= '0;
      x2      <= '0;
      y1      <= '0;
      y2      <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en;
      if (en) begin
        x2 <= x1;
        x1 <= x;
        y2 <= y1;
        y1 <= y_new;
      end
    end
  end

  // Integer part of the newest history value (floor).
  assign y = OUT_W'(y1 >>> FRAC_W);

endmodule
