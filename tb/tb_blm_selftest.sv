// tb_blm_selftest: end-to-end test of the combiner self-test add-on at its full size.
//
// A model of the acquisition chain drives both self-tests from one modulation generator:
// a sine of 256 samples per period with a new sample (and strobe) every STROBE_GAP clocks.
// The instant value test sees the reference and a running sum that is the sine delayed,
// scaled, offset and noisy; the long term analysis sees another running sum whose large
// offset sets bits above the 10 relevant ones. The testbench models the filters and the
// correlations in fixed point and checks every result exactly, plus the physical meaning
// (phase = applied delay). Scenarios: both tests started together at a period origin; a
// broken chain (no modulation reaches the running sum: gain 0); a strong signal that
// saturates the gain indication, with a start request during processing that must be
// ignored. After each instant value result the status check against a start-up window
// (gain 60..100, phase 40..50) must pass or flag the error. Each mechanism is counted and one that never happened counts as a failure.
`timescale 1ns / 1ps
module tb_blm_selftest;
  localparam int N = 256, STROBE_GAP = 4, SHIFT = 20;
  localparam real TWO_PI = 2.0 * 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, strobe = 1'b0;
  logic iv_start = 1'b0, lt_start = 1'b0;
  logic [15:0] iv_ref_in = '0, iv_rs_in = '0, lt_rs_in = '0;
  logic iv_busy, lt_busy;
  logic [6:0] iv_gain;
  logic [7:0] iv_phase;
  logic signed [15:0] lt_r_cos, lt_r_sin;
  logic [6:0] iv_gain_min = 7'd60, iv_gain_max = 7'd100;
  logic [7:0] iv_phase_min = 8'd40, iv_phase_max = 8'd50;
  logic iv_status_valid, iv_status_ok, iv_gain_err, iv_phase_err;
  int checks = 0, failures = 0;

  blm_selftest dut (
    .clk, .rst_n, .new_data_strobe(strobe),
    .iv_start, .iv_ref_in, .iv_rs_in, .iv_busy, .iv_gain, .iv_phase,
    .iv_gain_min, .iv_gain_max, .iv_phase_min, .iv_phase_max,
    .iv_status_valid, .iv_status_ok, .iv_gain_err, .iv_phase_err,
    .lt_start, .lt_rs_in, .lt_busy, .lt_r_cos, .lt_r_sin
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
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

  // ---------------------------------------------------------------- reference models
  typedef struct { longint x1, x2, y1, y2; } filt_t;
  function automatic longint filt_step(ref filt_t f, input longint x);
    longint acc, yn;
    acc = ((10 * (x + 2 * f.x1 + f.x2)) <<< 14) + 31631 * f.y1 - 15285 * f.y2;
    yn  = (acc + 8192) >>> 14;
    f.x2 = f.x1; f.x1 = x; f.y2 = f.y1; f.y1 = yn;
    return yn >>> 14;
  endfunction

  function automatic longint q128(input real v);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  function automatic int sat16(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  // ---------------------------------------------------------------- chain model
  filt_t fr = '{0, 0, 0, 0}, fs = '{0, 0, 0, 0}, fl = '{0, 0, 0, 0};
  int n_sample = 0;
  int iv_delay = 0, iv_amp_r = 1000, iv_amp_s = 300, lt_delay = 0, lt_amp = 200;
  longint rq [N], sq [N];
  int iv_ncap = N, lt_ncap = N;
  longint lt_acc_s, lt_acc_c;

  // mechanism counters
  int n_iv_runs = 0, n_lt_runs = 0, n_concurrent = 0, n_masked = 0;
  int n_broken = 0, n_saturated = 0, n_ignored_start = 0, n_settled = 0;
  int n_status_ok = 0, n_status_fail = 0;

  task automatic one_sample();
    int r, s, l;
    longint yr, ys, yl;
    r = 30000 + $rtoi(iv_amp_r * $sin(TWO_PI * n_sample / N));
    s = 20000 + $rtoi(iv_amp_s * $sin(TWO_PI * (n_sample - iv_delay) / N)) + int'($urandom_range(0, 6)) - 3;
    l = 32'hA200 + $rtoi(lt_amp * $sin(TWO_PI * (n_sample - lt_delay) / N)) + int'($urandom_range(0, 4)) - 2;
    iv_ref_in = 16'(r); iv_rs_in = 16'(s); lt_rs_in = 16'(l);
    strobe = 1'b1;
    yr = filt_step(fr, longint'(r));
    ys = filt_step(fs, longint'(s));
    yl = filt_step(fl, longint'(l) & 64'h3FF);
    if (iv_ncap < N) begin
      rq[iv_ncap] = yr; sq[iv_ncap] = ys; iv_ncap++;
    end
    if (lt_ncap < N) begin
      if (lt_rs_in[15:10] != 0) n_masked++;
      lt_acc_s += yl * q128(128.0 * $sin(TWO_PI * lt_ncap / N));
      lt_acc_c += yl * q128(128.0 * $cos(TWO_PI * lt_ncap / N));
      lt_ncap++;
    end
    n_sample++;
    @(negedge clk);
    strobe = 1'b0;
    if (iv_busy && lt_busy) n_concurrent++;
    repeat (STROBE_GAP - 1) begin
      @(negedge clk);
      if (iv_busy && lt_busy) n_concurrent++;
    end
  endtask

  // run to the next period origin, at least two periods after the last signal change
  task automatic settle();
    repeat (2 * N) one_sample();
    while (n_sample % N != 0) one_sample();
    n_settled++;
  endtask

  // ---------------------------------------------------------------- result checks
  task automatic check_iv(input string name, input int exp_delay, output int exp_gain);
    longint c, cmax, cmin, dd;
    int amax;
    for (int k = 0; k < N; k++) begin
      c = 0;
      for (int n = 0; n < N; n++) c += rq[n] * sq[(n + k) % N];
      if (k == 0 || c > cmax) begin cmax = c; amax = k; end
      if (k == 0 || c < cmin) cmin = c;
    end
    dd = (cmax - cmin) >>> SHIFT;
    exp_gain = (dd > 127) ? 127 : int'(dd);
    check(int'(iv_gain) == exp_gain, $sformatf("%s: gain %0d expected %0d", name, iv_gain, exp_gain));
    check(int'(iv_phase) == amax, $sformatf("%s: phase %0d expected %0d", name, iv_phase, amax));
    if (exp_delay >= 0)
      check(int'(iv_phase) == exp_delay, $sformatf("%s: phase %0d, delay %0d", name, iv_phase, exp_delay));
    n_iv_runs++;
  endtask

  task automatic check_lt(input string name);
    check(int'(lt_r_sin) == sat16(lt_acc_s >>> 8), $sformatf("%s: r_sin %0d expected %0d", name, lt_r_sin, sat16(lt_acc_s >>> 8)));
    check(int'(lt_r_cos) == sat16(lt_acc_c >>> 8), $sformatf("%s: r_cos %0d expected %0d", name, lt_r_cos, sat16(lt_acc_c >>> 8)));
    n_lt_runs++;
  endtask

  // wait for the instant value test to finish, counting its busy time
  task automatic wait_iv(output int clocks, input bit poke_start);
    clocks = STROBE_GAP;
    while (iv_busy || iv_ncap < N) begin
      if (iv_ncap < N || lt_busy) begin
        one_sample();
        clocks += STROBE_GAP;
      end else begin
        if (poke_start && clocks == 30000) iv_start = 1'b1;
        @(negedge clk);
        iv_start = 1'b0;
        clocks++;
      end
    end
  endtask

  initial begin
    int clocks, g;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!iv_busy && !lt_busy, "idle after reset");

    // 1: both tests started together at a period origin
    iv_delay = 45; lt_delay = 20;
    settle();
    iv_start = 1'b1; lt_start = 1'b1;
    iv_ncap = 0; lt_ncap = 0; lt_acc_s = 0; lt_acc_c = 0;
    one_sample();
    iv_start = 1'b0; lt_start = 1'b0;
    wait_iv(clocks, 1'b0);
    check(!lt_busy, "long term result ready before the instant value result");
    @(negedge clk);
    check(iv_status_valid && iv_status_ok && !iv_gain_err && !iv_phase_err, "run 1: status ok");
    if (iv_status_ok) n_status_ok++;
    check_lt("run 1");
    check_iv("run 1", 45, g);
    check(g > 0 && g < 127, "run 1: gain in range");
    check(clocks >= (N - 1) * STROBE_GAP + N * N && clocks <= N * STROBE_GAP + N * N + 6,
          $sformatf("run 1: busy for %0d clocks", clocks));

    // 2: broken chain, no modulation on the running sums
    iv_amp_s = 0; lt_amp = 0;
    settle();
    iv_start = 1'b1; lt_start = 1'b1;
    iv_ncap = 0; lt_ncap = 0; lt_acc_s = 0; lt_acc_c = 0;
    one_sample();
    iv_start = 1'b0; lt_start = 1'b0;
    wait_iv(clocks, 1'b0);
    @(negedge clk);
    check(iv_status_valid && !iv_status_ok && iv_gain_err, "broken: status reports a gain error");
    if (!iv_status_ok) n_status_fail++;
    check_lt("broken");
    check_iv("broken", -1, g);
    check(g <= 1, $sformatf("broken chain: gain %0d", g));
    check(lt_r_sin > -200 && lt_r_sin < 200 && lt_r_cos > -200 && lt_r_cos < 200, "broken chain: long term near zero");
    if (g <= 1) n_broken++;

    // 3: strong signal saturates the gain indication; a start during processing is ignored
    iv_amp_r = 12000; iv_amp_s = 9000; iv_delay = 130; lt_amp = 300; lt_delay = 100;
    settle();
    iv_start = 1'b1; lt_start = 1'b1;
    iv_ncap = 0; lt_ncap = 0; lt_acc_s = 0; lt_acc_c = 0;
    one_sample();
    iv_start = 1'b0; lt_start = 1'b0;
    wait_iv(clocks, 1'b1);
    @(negedge clk);
    check(!iv_status_ok && iv_gain_err && iv_phase_err, "strong: gain and phase outside the start-up window");
    if (!iv_status_ok) n_status_fail++;
    check_lt("strong");
    check_iv("strong", 130, g);
    check(g == 127, "strong: gain saturated");
    if (g == 127) n_saturated++;
    check(clocks <= N * STROBE_GAP + N * N + 6, $sformatf("strong: busy for %0d clocks despite the extra start", clocks));
    repeat (10) @(negedge clk);
    check(!iv_busy, "extra start did not begin a new cycle");
    if (clocks <= N * STROBE_GAP + N * N + 6 && !iv_busy) n_ignored_start++;

    $display("mechanisms: settled=%0d iv_runs=%0d lt_runs=%0d concurrent_clocks=%0d masked_samples=%0d broken=%0d saturated=%0d ignored_start=%0d status_ok=%0d status_fail=%0d",
             n_settled, n_iv_runs, n_lt_runs, n_concurrent, n_masked, n_broken, n_saturated, n_ignored_start, n_status_ok, n_status_fail);
    check(n_status_ok > 0 && n_status_fail > 0, "status check both passed and flagged a failure");
    check(n_settled > 0, "filter settling exercised");
    check(n_iv_runs == 3, "instant value test cycles");
    check(n_lt_runs == 3, "long term analysis runs");
    check(n_concurrent > 0, "both tests busy at the same time");
    check(n_masked > 0, "input MSB masking exercised");
    check(n_broken > 0, "broken chain detected");
    check(n_saturated > 0, "gain saturation exercised");
    check(n_ignored_start > 0, "start during processing ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
