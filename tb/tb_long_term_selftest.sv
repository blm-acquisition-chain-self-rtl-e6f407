// tb_long_term_selftest: self-checking test of the long term analysis block.
//
// A chain model produces a running sum that is a sine of 256 samples per period, delayed
// by a known number of samples and scaled, on a large offset whose upper bits are set
// (they must be dropped by the 10-bit input mask), with noise. After the filter has
// settled, start is given at the origin of a period. The testbench runs its own
// fixed-point model of the filter and of the two correlations with round(128 sin) and
// round(128 cos) references and checks r_sin and r_cos exactly. It also checks them
// against the analytic result: r_sin = 64*Ay*cos(phi), r_cos = -64*Ay*sin(phi), where
// Ay is the filtered amplitude and phi the chain delay plus the filter's phase lag of
// atan(0.5*sqrt(2)/(1-0.25)) = 43.3 degrees at the modulation frequency, and that busy
// lasts one period of strobes.
`timescale 1ns / 1ps
module tb_long_term_selftest;
  localparam int N = 256, STROBE_GAP = 3;
  localparam real PI = 3.14159265358979;
  localparam real TWO_PI = 2.0 * PI;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, strobe = 1'b0;
  logic [15:0] rs_in = '0;
  logic busy;
  logic signed [15:0] r_cos, r_sin;
  int checks = 0, failures = 0;

  long_term_selftest dut (.clk, .rst_n, .start, .new_data_strobe(strobe), .rs_in, .busy, .r_cos, .r_sin);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
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

  filt_t f = '{0, 0, 0, 0};
  int n_sample = 0, delay = 0, amp = 200, base = 32'hA200;
  bit capture = 0;
  int ncap = 0;
  longint acc_s, acc_c;

  task automatic one_sample();
    int s;
    longint y;
    s = base + $rtoi(amp * $sin(TWO_PI * (n_sample - delay) / N)) + int'($urandom_range(0, 4)) - 2;
    rs_in = 16'(s);
    strobe = 1'b1;
    y = filt_step(f, longint'(s) & 64'h3FF);
    if (capture && ncap < N) begin
      acc_s += y * q128(128.0 * $sin(TWO_PI * ncap / N));
      acc_c += y * q128(128.0 * $cos(TWO_PI * ncap / N));
      ncap++;
    end
    n_sample++;
    @(negedge clk);
    strobe = 1'b0;
    repeat (STROBE_GAP - 1) @(negedge clk);
  endtask

  function automatic int sat16(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  task automatic run_test(input int d, input int a, input int b);
    int busy_clocks;
    real ay, phi, es, ec;
    delay = d; amp = a; base = b;
    while (n_sample % N != 0 || n_sample < 4 * N) one_sample();
    repeat (4 * N) one_sample();
    start = 1'b1; capture = 1; ncap = 0; acc_s = 0; acc_c = 0;
    one_sample();
    start = 1'b0;
    busy_clocks = STROBE_GAP;
    while (ncap < N) begin one_sample(); busy_clocks += STROBE_GAP; end
    capture = 0;
    while (busy) begin
      @(negedge clk);
      busy_clocks++;
    end
    check(int'(r_sin) == sat16(acc_s >>> 8), $sformatf("r_sin %0d expected %0d", r_sin, sat16(acc_s >>> 8)));
    check(int'(r_cos) == sat16(acc_c >>> 8), $sformatf("r_cos %0d expected %0d", r_cos, sat16(acc_c >>> 8)));
    ay  = a * (40.0 / 38.0) * 0.970;
    phi = TWO_PI * d / N + 43.3 * PI / 180.0;
    es  = 64.0 * ay * $cos(phi);
    ec  = -64.0 * ay * $sin(phi);
    check((real'(r_sin) - es) < 0.03 * 64.0 * ay && (es - real'(r_sin)) < 0.03 * 64.0 * ay,
          $sformatf("delay %0d: r_sin %0d, analytic %f", d, r_sin, es));
    check((real'(r_cos) - ec) < 0.03 * 64.0 * ay && (ec - real'(r_cos)) < 0.03 * 64.0 * ay,
          $sformatf("delay %0d: r_cos %0d, analytic %f", d, r_cos, ec));
    check(busy_clocks >= (N - 1) * STROBE_GAP && busy_clocks <= N * STROBE_GAP + 4,
          $sformatf("busy for %0d clocks", busy_clocks));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!busy && r_sin == 0 && r_cos == 0, "reset state");
    run_test(0, 200, 32'hA200);
    run_test(50, 400, 32'h3200);
    run_test(170, 100, 32'hFE00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
