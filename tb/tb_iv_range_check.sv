// tb_iv_range_check: self-checking test of the status check on instant value results.
//
// Random results and start-up windows, including phase windows that wrap through zero.
// The expected verdict uses the circular form: a phase is inside when
// (phase - phase_min) mod 256 <= (phase_max - phase_min) mod 256. Checks that nothing is
// reported before the first falling edge of busy, that the verdict appears one clock after
// busy falls, and that it holds while the inputs change without a new falling edge.
`timescale 1ns / 1ps
module tb_iv_range_check;
  logic clk = 1'b0, rst_n = 1'b0, busy = 1'b0;
  logic [6:0] gain = '0, gain_min = '0, gain_max = '0;
  logic [7:0] phase = '0, phase_min = '0, phase_max = '0;
  logic status_valid, status_ok, gain_err, phase_err;
  int checks = 0, failures = 0;
  int n_wrap = 0;

  iv_range_check dut (.clk, .rst_n, .busy, .gain, .phase, .gain_min, .gain_max, .phase_min,
                      .phase_max, .status_valid, .status_ok, .gain_err, .phase_err);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
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

  initial begin
    bit exp_g, exp_p, last_ok;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(!status_valid && !status_ok, "no status before the first result");
    for (int i = 0; i < 2000; i++) begin
      busy = 1'b1;
      repeat ($urandom_range(1, 4)) @(negedge clk);
      gain = 7'($urandom); phase = 8'($urandom);
      gain_min = 7'($urandom); gain_max = gain_min + 7'($urandom_range(0, 40));
      if (gain_max < gain_min) gain_max = 7'd127;
      phase_min = 8'($urandom); phase_max = phase_min + 8'($urandom_range(0, 60));
      if (phase_max < phase_min) n_wrap++;
      if (i % 3 == 0) gain = gain_min + 7'($urandom_range(0, 3));
      if (i % 4 == 0) phase = phase_min + 8'($urandom_range(0, 3));
      exp_g = (int'(gain) >= int'(gain_min)) && (int'(gain) <= int'(gain_max));
      exp_p = (int'(8'(phase - phase_min)) <= int'(8'(phase_max - phase_min)));
      busy = 1'b0;
      @(negedge clk);
      check(status_valid, "status valid after a result");
      check(status_ok == (exp_g && exp_p) && gain_err == !exp_g && phase_err == !exp_p,
            $sformatf("gain %0d in [%0d,%0d], phase %0d in [%0d,%0d]: ok=%0b gerr=%0b perr=%0b",
                      gain, gain_min, gain_max, phase, phase_min, phase_max, status_ok, gain_err, phase_err));
      last_ok = status_ok;
      gain = 7'($urandom); phase = 8'($urandom);
      @(negedge clk);
      check(status_ok == last_ok, "verdict holds without a new result");
    end
    check(n_wrap > 0, "wrapping phase windows exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
