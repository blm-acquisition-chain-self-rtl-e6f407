// sine_rom: the two ideal reference tables of the long term analysis.
//
// One period of a sine and of a cosine, N entries each, amplitude AMP, two's complement:
//   sin_q[i] = round(AMP * sin(2*pi*i/N)),  cos_q[i] = round(AMP * cos(2*pi*i/N))
// The tables are computed at elaboration time (constant functions), so no data file is
// needed. With AMP = 128 the positive peak is +128, hence the 9-bit word: the width is
// this design's choice, the amplitude follows the original design. Rounding is symmetric, so each
// table sums to zero over a period and a DC offset on the correlated signal cancels.
// The read is combinational: the outputs follow addr in the same clock.
module sine_rom
  import blm_pkg::*;
#(
  parameter int unsigned N   = N_SAMPLES,
  parameter int unsigned AW  = $clog2(N),
  parameter int unsigned AMP = 128,
  parameter int unsigned W   = 9
) (
  input  logic [AW-1:0]       addr,
  output logic signed [W-1:0] sin_q,
  output logic signed [W-1:0] cos_q
);

  typedef logic signed [W-1:0] table_t [N];

  localparam real PI = 3.14159265358979323846;

  function automatic logic signed [W-1:0] quant(input real v);
    real r;
    r = (v >= 0.0) ? $floor(v + 0.5) : -$floor(-v + 0.5);
    return W'($rtoi(r));
  endfunction

  function automatic table_t make_table(input bit cosine);
    table_t t;
    for (int i = 0; i < int'(N); i++) begin
      if (cosine) t[i] = quant(real'(AMP) * $cos(2.0 * PI * real'(i) / real'(N)));
      else        t[i] = quant(real'(AMP) * $sin(2.0 * PI * real'(i) / real'(N)));
    end
    return t;
  endfunction

  localparam table_t SIN_TAB = make_table(1'b0);
  localparam table_t COS_TAB = make_table(1'b1);

  assign sin_q = SIN_TAB[addr];
  assign cos_q = COS_TAB[addr];

endmodule
