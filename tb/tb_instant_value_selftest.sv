// tb_instant_value_selftest: self-checking test of the instant value self-test.
//
// A chain model produces a noisy reference sine (256 samples per period, on an offset, as
// when it is taken from the high-voltage monitor) and a
// running sum that is the same sine delayed by a known number of samples, scaled, on
// another offset and with noise; a new sample comes with a strobe every STROBE_GAP
// clocks. After the filters have settled a test cycle is started. The testbench runs its
// own fixed-point model of the filter equation on both inputs, forms the 256 circular
// correlations of the stored period and checks gain and phase exactly; it also checks
// that the phase equals the applied delay (the filters are identical, so their phase
// shift cancels) and that busy lasts one period of strobes plus 256*256 clocks.
`timescale 1ns / 1ps
module tb_instant_value_selftest;
  localparam int N = 256, STROBE_GAP = 4, SHIFT = 20;
  localparam real TWO_PI = 2.0 * 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, strobe = 1'b0;
  logic [15:0] ref_in = '0, rs_in = '0;
  logic busy;
  logic [6:0] gain;
  logic [7:0] phase;
  int checks = 0, failures = 0;

  instant_value_selftest dut (
    .clk, .rst_n, .start, .new_data_strobe(strobe), .ref_in, .rs_in, .busy, .gain, .phase
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // fixed-point model of the filter: B0 = 10, A1 = -31631, A2 = 15285 (Q2.14), 14 extra
  // fractional history bits, rounding on the 2^-14 step, floor on the output
  typedef struct { longint x1, x2, y1, y2; } filt_t;
  function automatic longint filt_step(ref filt_t f, input longint x);
    longint acc, yn;
    acc = ((10 * (x + 2 * f.x1 + f.x2)) <<< 14) + 31631 * f.y1 - 15285 * f.y2;
    yn  = (acc + 8192) >>> 14;
    f.x2 = f.x1; f.x1 = x; f.y2 = f.y1; f.y1 = yn;
    return yn >>> 14;
  endfunction

  filt_t fr = '{0, 0, 0, 0}, fs = '{0, 0, 0, 0};
  longint rq [N], sq [N];
  int n_sample = 0, delay = 0, amp_r = 1000, amp_s = 300, off_r = 30000, off_s = 20000;
  bit capture = 0;
  int ncap = 0;

  // chain model: one new sample per strobe
  task automatic one_sample();
    int r, s;
    r = off_r + $rtoi(amp_r * $sin(TWO_PI * n_sample / N)) + int'($urandom_range(0, 6)) - 3;
    s = off_s + $rtoi(amp_s * $sin(TWO_PI * (n_sample - delay) / N)) + int'($urandom_range(0, 6)) - 3;
    ref_in = 16'(r); rs_in = 16'(s);
    strobe = 1'b1;
    if (capture && ncap < N) begin
      rq[ncap] = filt_step(fr, longint'(r));
      sq[ncap] = filt_step(fs, longint'(s));
      ncap++;
    end else begin
      void'(filt_step(fr, longint'(r)));
      void'(filt_step(fs, longint'(s)));
    end
    n_sample++;
    @(negedge clk);
    strobe = 1'b0;
    repeat (STROBE_GAP - 1) @(negedge clk);
  endtask

  task automatic run_test(input int d, input int ar, input int as_, input int orf, input int osf);
    longint c, cmax, cmin, dd;
    int amax, exp_gain, busy_clocks;
    real g_est;
    delay = d; amp_r = ar; amp_s = as_; off_r = orf; off_s = osf;
    // settle the filters on the new signals (about two periods), end on a period boundary
    while (n_sample % N != 0 || n_sample < 3 * N) one_sample();
    repeat (3 * N) one_sample();
    // start in a strobe clock: that strobe's sample is the first one stored
    start = 1'b1; capture = 1; ncap = 0;
    one_sample();
    start = 1'b0;
    busy_clocks = STROBE_GAP;
    while (ncap < N) begin one_sample(); busy_clocks += STROBE_GAP; end
    capture = 0;
    while (busy) begin
      @(negedge clk);
      busy_clocks++;
    end
    for (int k = 0; k < N; k++) begin
      c = 0;
      for (int n = 0; n < N; n++) c += rq[n] * sq[(n + k) % N];
      if (k == 0 || c > cmax) begin cmax = c; amax = k; end
      if (k == 0 || c < cmin) cmin = c;
    end
    dd = (cmax - cmin) >>> SHIFT;
    exp_gain = (dd > 127) ? 127 : int'(dd);
    check(int'(phase) == amax, $sformatf("delay %0d: phase %0d expected %0d", d, phase, amax));
    check(int'(gain) == exp_gain, $sformatf("delay %0d: gain %0d expected %0d", d, gain, exp_gain));
    check(int'(phase) == d, $sformatf("delay %0d: phase %0d does not match the delay", d, phase));
    // max - min = N * Ar' * As' with the filtered amplitudes (x 40/38 x 0.97 each)
    g_est = real'(N) * (ar * 1.0205) * (as_ * 1.0205) / real'(1 << SHIFT);
    if (g_est > 127.0) g_est = 127.0;
    check(real'(gain) > g_est * 0.9 - 1.0 && real'(gain) < g_est * 1.1 + 1.0,
          $sformatf("gain %0d far from the amplitude estimate %f", gain, g_est));
    check(busy_clocks >= (N - 1) * STROBE_GAP + N * N && busy_clocks <= N * STROBE_GAP + N * N + 6,
          $sformatf("busy for %0d clocks", busy_clocks));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!busy && gain == 0 && phase == 0, "reset state");
    run_test(0, 1000, 300, 30000, 20000);
    run_test(37, 2000, 200, 10000, 50000);
    run_test(200, 800, 700, 40000, 5000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
