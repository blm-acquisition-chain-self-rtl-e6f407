// tb_iv_correlator: self-checking test of the sliding-window correlation engine.
//
// The testbench plays the two RAMs (arrays with a one-clock registered read) and loads
// them with: sine pairs with a known delay, offset and noise; a saturating case; and
// purely random data. For every case it computes all 256 circular correlations itself,
// and checks gain (max - min, shifted and saturated), phase (lag of the first maximum),
// the done pulse and the run length of 256*256 clocks plus a short tail. A start pulse in
// the middle of a run must be ignored.
`timescale 1ns / 1ps
module tb_iv_correlator;
  localparam int W = 18, N = 256, SHIFT = 20;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] ref_addr, rs_addr;
  logic signed [W-1:0] ref_data, rs_data;
  logic running, done;
  logic [6:0] gain;
  logic [7:0] phase;
  logic signed [W-1:0] rmem [N], smem [N];
  int checks = 0, failures = 0;

  iv_correlator #(.WIDTH(W), .N(N), .GAIN_SHIFT(SHIFT)) dut (
    .clk, .rst_n, .start, .ref_addr, .rs_addr, .ref_data, .rs_data,
    .running, .done, .gain, .phase
  );

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    ref_data <= rmem[ref_addr];
    rs_data  <= smem[rs_addr];
  end

  initial begin
    repeat (600_000) @(posedge clk);
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

  task automatic run_case(input string name, input int exp_delay);
    longint c, cmax, cmin;
    int amax, cycles, exp_gain;
    longint d;
    for (int k = 0; k < N; k++) begin
      c = 0;
      for (int n = 0; n < N; n++) c += longint'(rmem[n]) * longint'(smem[(n + k) % N]);
      if (k == 0 || c > cmax) begin cmax = c; amax = k; end
      if (k == 0 || c < cmin) cmin = c;
    end
    d = (cmax - cmin) >>> SHIFT;
    exp_gain = (d > 127) ? 127 : int'(d);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
      if (cycles == 30000) start = 1'b1;       // must be ignored
      if (cycles == 30001) start = 1'b0;
      if (cycles > 70000) break;
    end
    check(done, {name, ": done pulse"});
    check(cycles >= N * N && cycles <= N * N + 4, $sformatf("%s: run took %0d clocks", name, cycles));
    check(int'(phase) == amax, $sformatf("%s: phase %0d expected %0d", name, phase, amax));
    check(int'(gain) == exp_gain, $sformatf("%s: gain %0d expected %0d", name, gain, exp_gain));
    if (exp_delay >= 0)
      check(int'(phase) == exp_delay, $sformatf("%s: phase %0d, applied delay %0d", name, phase, exp_delay));
    @(negedge clk);
    check(!done && !running, {name, ": done is a single pulse"});
  endtask

  initial begin
    int dl, ar, as_, off;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // sine pairs with a known delay of the running sum behind the reference
    for (int t = 0; t < 4; t++) begin
      dl  = (t == 0) ? 0 : int'($urandom_range(1, 255));
      ar  = int'($urandom_range(500, 3000));
      as_ = int'($urandom_range(100, 1000));
      off = int'($urandom_range(0, 60000));
      for (int n = 0; n < N; n++) begin
        rmem[n] = W'($rtoi(ar * $sin(2.0 * 3.14159265358979 * n / N)) + 30000);
        smem[(n + dl) % N] = W'($rtoi(as_ * $sin(2.0 * 3.14159265358979 * n / N)) + off
                                + int'($urandom_range(0, 8)) - 4);
      end
      run_case($sformatf("sine delay %0d", dl), dl);
    end
    // large signals: gain saturates at 127
    for (int n = 0; n < N; n++) begin
      rmem[n] = W'($rtoi(60000.0 * $sin(2.0 * 3.14159265358979 * n / N)));
      smem[n] = W'($rtoi(60000.0 * $sin(2.0 * 3.14159265358979 * (n - 100) / N)));
    end
    run_case("saturated", 100);
    // random data, including negative values
    for (int n = 0; n < N; n++) begin
      rmem[n] = W'($urandom);
      smem[n] = W'($urandom);
    end
    run_case("random", -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
