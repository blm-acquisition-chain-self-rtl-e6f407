// tb_iir_filter: self-checking test of the second-order low-pass filter.
//
// Drives a noisy, offset sine of 256 samples per period with irregular strobe spacing and
// compares every output with a double-precision model of the same difference equation
// (quantised coefficients, exact arithmetic), allowing 2 LSB for the fixed-point rounding.
// It also checks the one-clock y_valid latency, the settled DC gain (40/38 of the input)
// and the gain at the modulation frequency (about 0.97 of the DC gain, since the cut-off
// is at twice that frequency).
`timescale 1ns / 1ps
module tb_iir_filter;
  import blm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [15:0] x = '0;
  logic signed [17:0] y;
  logic y_valid;
  int checks = 0, failures = 0;

  iir_filter dut (.clk, .rst_n, .en, .x, .y, .y_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real b0, a1, a2;
  real rx1 = 0.0, rx2 = 0.0, ry1 = 0.0, ry2 = 0.0, ry;

  function automatic real model_step(input real xin);
    real yn;
    yn = b0 * (xin + 2.0 * rx1 + rx2) - a1 * ry1 - a2 * ry2;
    rx2 = rx1; rx1 = xin; ry2 = ry1; ry1 = yn;
    return yn;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // Apply one sample, wait for the output and compare it with the model.
  task automatic sample(input int xin, input int gap);
    real err;
    @(negedge clk);
    x = 16'(xin); en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    check(y_valid == 1'b1, "y_valid one clock after en");
    ry = model_step(real'(xin));
    err = real'(y) - ry;
    if (err < 0.0) err = -err;
    check(err <= 2.0, $sformatf("y=%0d model=%f", y, ry));
    repeat (gap) begin
      @(negedge clk);
      check(y_valid == 1'b0, "y_valid only once per strobe");
    end
  endtask

  real pk_hi, pk_lo;
  int  v;

  initial begin
    b0 = real'(FILT_B0) / 16384.0;
    a1 = real'(FILT_A1) / 16384.0;
    a2 = real'(FILT_A2) / 16384.0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // noisy offset sine, 8 periods
    for (int n = 0; n < 8 * 256; n++) begin
      v = 30000 + $rtoi(1000.0 * $sin(2.0 * 3.14159265358979 * n / 256.0)) + int'($urandom_range(0, 200)) - 100;
      sample(v, $urandom_range(0, 3));
    end
    // clean sine: measure amplitude over the last period
    pk_hi = -1.0e9; pk_lo = 1.0e9;
    for (int n = 0; n < 4 * 256; n++) begin
      v = 20000 + $rtoi(4000.0 * $sin(2.0 * 3.14159265358979 * n / 256.0));
      sample(v, 0);
      if (n >= 3 * 256) begin
        if (real'(y) > pk_hi) pk_hi = real'(y);
        if (real'(y) < pk_lo) pk_lo = real'(y);
      end
    end
    // |H(Fin)| / |H(0)| = 1/sqrt(1 + (1/2)^4) = 0.970 for a 2nd-order Butterworth
    check((pk_hi - pk_lo) / 2.0 > 4000.0 * (40.0 / 38.0) * 0.95 &&
          (pk_hi - pk_lo) / 2.0 < 4000.0 * (40.0 / 38.0) * 0.99,
          $sformatf("amplitude at Fin %f", (pk_hi - pk_lo) / 2.0));
    // DC step settles to 40/38 of the input
    for (int n = 0; n < 2000; n++) sample(12000, 0);
    check(y >= 12630 - 2 && y <= 12632 + 2, $sformatf("DC gain: y=%0d", y));
    // maximum input: no saturation, 65535 * 40/38
    for (int n = 0; n < 2000; n++) sample(65535, 0);
    check(y >= 68984 - 2 && y <= 68984 + 2, $sformatf("full scale: y=%0d", y));
    // reset clears the history
    @(negedge clk); rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    check(y == 0, "reset clears output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
