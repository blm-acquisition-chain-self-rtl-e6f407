// iv_correlator: circular moving-window cross-correlation engine of the instant value test.
//
// With the reference period r[0..N-1] and the running-sum period s[0..N-1] stored in two
// RAMs, it computes for every lag k = 0..N-1
//   Corr[k] = sum_{n=0..N-1} r[n] * s[(n + k) mod N]
// with a single multiply-accumulate unit, one product per clock, so a run takes N*N
// clocks plus a three-clock tail. While the lags go by it keeps the highest and the lowest
// correlation value and the lag of the highest. The lag of the peak is the phase: the
// number of samples by which the running sum lags the reference (one step = 360/N degrees).
// The gain indication is max - min, formed by a subtractor, then shifted right by
// GAIN_SHIFT and saturated to GAIN_W bits. The shift that sets the sensitivity is this
// design's choice; a constant offset on either signal adds the same amount to every lag
// and so changes neither output.
//
// Interface: a one-clock start pulse launches a run; ref_addr/rs_addr drive the RAM read
// ports (registered read, one clock latency); done pulses for one clock when gain and
// phase have been updated, and they then hold until the next run. start is ignored while
// a run is in progress. Ties between equal peaks keep the lowest lag.
module iv_correlator
  import blm_pkg::*;
#(
  parameter int unsigned WIDTH      = DATA_W + 2,   // signed sample width in the RAMs
  parameter int unsigned N          = N_SAMPLES,    // samples per period (power of two)
  parameter int unsigned AW         = $clog2(N),
  parameter int unsigned GAIN_W     = 7,
  parameter int unsigned GAIN_SHIFT = 20
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic [AW-1:0]           ref_addr,
  output logic [AW-1:0]           rs_addr,
  input  logic signed [WIDTH-1:0] ref_data,
  input  logic signed [WIDTH-1:0] rs_data,
  output logic                    running,
  output logic                    done,
  output logic [GAIN_W-1:0]       gain,
  output logic [AW-1:0]           phase
);

  localparam int unsigned ACC_W = 2 * WIDTH + AW;

  // issue stage
  logic [AW-1:0] n, k;
  // stage aligned with the RAM outputs
  logic          v1, first1, last1;
  logic [AW-1:0] lag1;
  // accumulation and peak tracking
  logic signed [ACC_W-1:0] acc, sum;
  logic signed [ACC_W-1:0] cmax, cmin;
  logic [AW-1:0]           argmax;
  logic                    fin;
  logic [ACC_W:0]          diff, diff_sh;

  assign ref_addr = n;
  assign rs_addr  = n + k;     // wraps modulo N

  always_comb begin
    sum = (first1 ? '0 : acc) + ACC_W'(ref_data) * ACC_W'(rs_data);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      n       <= '0;
      k       <= '0;
      v1      <= 1'b0;
      first1  <= 1'b0;
      last1   <= 1'b0;
      lag1    <= '0;
      acc     <= '0;
      cmax    <= '0;
      cmin    <= '0;
      argmax  <= '0;
      fin     <= 1'b0;
    end else begin
      // issue one product per clock: n runs fastest, k is the lag
      if (start && !running) begin
        running <= 1'b1;
        n       <= '0;
        k       <= '0;
      end else if (running) begin
        n <= n + 1'b1;
        if (n == AW'(N - 1)) begin
          k <= k + 1'b1;
          if (k == AW'(N - 1)) running <= 1'b0;
        end
      end
      v1     <= running;
      first1 <= running && (n == '0);
      last1  <= running && (n == AW'(N - 1));
      lag1   <= k;

      if (v1) acc <= sum;
      if (v1 && last1) begin
        if (lag1 == '0 || sum > cmax) begin
          cmax   <= sum;
          argmax <= lag1;
        end
        if (lag1 == '0 || sum < cmin) cmin <= sum;
      end
      fin <= v1 && last1 && (lag1 == AW'(N - 1));
    end
  end

  // gain indication: difference of the extremes, scaled and saturated
  assign diff    = (ACC_W + 1)'(cmax) - (ACC_W + 1)'(cmin);
  assign diff_sh = diff >> GAIN_SHIFT;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done  <= 1'b0;
      gain  <= '0;
      phase <= '0;
    end else begin
      done <= fin;
      if (fin) begin
        gain  <= (diff_sh > (ACC_W + 1)'({GAIN_W{1'b1}})) ? {GAIN_W{1'b1}} : GAIN_W'(diff_sh);
        phase <= argmax;
      end
    end
  end

  // The extremes are ordered once the first lag has been seen.
  assert property (@(posedge clk) disable iff (!rst_n) fin |-> cmax >= cmin)
    else $error("iv_correlator: max below min");

endmodule
