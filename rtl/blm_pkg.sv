// blm_pkg: constants and types shared by the BLM acquisition chain self-test blocks.
//
// Both self-tests work on one period of the modulation sine sampled 256 times, so the
// period length, the address width and the filter coefficients live here. The filter
// coefficients are the bilinear-transform Butterworth low-pass with the cut-off at twice
// the modulation frequency (Ts*wc = 4*pi/256), quantised to signed 16-bit words with 14
// fractional bits:
//   K  = 2/(Ts*wc) = 128/pi,  C = K^2 + sqrt(2)K + 1,  b2 = 2 - 2K^2,  b1 = K^2 - sqrt(2)K + 1
//   y[n] = (x[n] + 2x[n-1] + x[n-2]) / C - (b2/C) y[n-1] - (b1/C) y[n-2]
//   FILT_B0 = round(2^14/C) = 10, FILT_A1 = round(2^14*b2/C) = -31631, FILT_A2 = round(2^14*b1/C) = 15285
// The rounded coefficients give a DC gain of 40/38 (about 1.05); both instant-value
// inputs go through the same filter, so this scale factor cancels in the phase.
package blm_pkg;

  localparam int unsigned N_SAMPLES = 256;   // samples per modulation period
  localparam int unsigned ADDR_W    = 8;     // log2(N_SAMPLES)
  localparam int unsigned DATA_W    = 16;    // width of the reference and running-sum inputs

  localparam int unsigned COEF_W    = 16;    // filter coefficient word
  localparam int unsigned COEF_FRAC = 14;    // fractional bits of the coefficients
  localparam logic signed [COEF_W-1:0] FILT_B0 = 16'sd10;
  localparam logic signed [COEF_W-1:0] FILT_A1 = -16'sd31631;
  localparam logic signed [COEF_W-1:0] FILT_A2 = 16'sd15285;

  // Instant value self-test controller states (Moore machine).
  typedef enum logic [1:0] {
    IV_IDLE  = 2'd0,   // waiting for start, busy low
    IV_ACQ   = 2'd1,   // storing 256 filtered samples of both signals
    IV_START = 2'd2,   // one-cycle launch of the correlator
    IV_PROC  = 2'd3    // sliding-window correlation running
  } iv_state_t;

  // Long term analysis controller states.
  typedef enum logic [1:0] {
    LT_IDLE  = 2'd0,   // waiting for start, busy low
    LT_RUN   = 2'd1,   // accumulating one period
    LT_OUT   = 2'd2    // scaling the accumulators into the outputs
  } lt_state_t;

endpackage
