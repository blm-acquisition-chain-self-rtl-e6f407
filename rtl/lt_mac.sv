// lt_mac: the two concurrent multiply-accumulate units of the long term analysis.
//
// On every enabled clock it adds y * sin_ref to acc_sin and y * cos_ref to acc_cos, so
// after one period they hold the zero-lag cross-correlations of the filtered running sum
// with the two ideal references (not yet divided by the number of samples). clear zeroes
// both accumulators (it wins over en). All values are signed two's complement; the
// accumulators are wide enough for N products at full scale, so they never overflow.
module lt_mac
  import blm_pkg::*;
#(
  parameter int unsigned IN_W  = 12,          // signed filtered sample width
  parameter int unsigned REF_W = 9,           // signed reference width
  parameter int unsigned N     = N_SAMPLES,   // products per period
  parameter int unsigned ACC_W = IN_W + REF_W + $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  y,
  input  logic signed [REF_W-1:0] sin_ref,
  input  logic signed [REF_W-1:0] cos_ref,
  output logic signed [ACC_W-1:0] acc_sin,
  output logic signed [ACC_W-1:0] acc_cos
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      acc_sin <= '0;
      acc_cos <= '0;
    end else if (en) begin
      acc_sin <= acc_sin + ACC_W'(y) * ACC_W'(sin_ref);
      acc_cos <= acc_cos + ACC_W'(y) * ACC_W'(cos_ref);
    end
  end

endmodule
