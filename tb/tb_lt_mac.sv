// tb_lt_mac: self-checking test of the two multiply-accumulate units.
//
// Feeds several periods of random signed samples and references with random enable
// gaps, clears in between, and compares both accumulators with sums formed here in
// 64-bit integers after every clock. Includes a full-scale period (all products at the
// extreme) to check that the accumulator width cannot overflow.
`timescale 1ns / 1ps
module tb_lt_mac;
  localparam int IN_W = 12, REF_W = 9, ACC_W = IN_W + REF_W + 8;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0;
  logic signed [IN_W-1:0]  y = '0;
  logic signed [REF_W-1:0] sin_ref = '0, cos_ref = '0;
  logic signed [ACC_W-1:0] acc_sin, acc_cos;
  longint es = 0, ec = 0;
  int checks = 0, failures = 0;

  lt_mac #(.IN_W(IN_W), .REF_W(REF_W)) dut (.clk, .rst_n, .clear, .en, .y, .sin_ref, .cos_ref, .acc_sin, .acc_cos);

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

  task automatic step(input bit full);
    @(negedge clk);
    en = 1'($urandom_range(0, 3) != 0);
    if (full) begin
      y = {1'b1, {(IN_W - 1){1'b0}}}; sin_ref = -9'sd128; cos_ref = -9'sd128;
    end else begin
      y = IN_W'($urandom); sin_ref = REF_W'($urandom_range(0, 256)) - 9'sd128;
      cos_ref = REF_W'($urandom_range(0, 256)) - 9'sd128;
    end
    if (en) begin
      es += longint'(y) * longint'(sin_ref);
      ec += longint'(y) * longint'(cos_ref);
    end
    @(posedge clk); #1;
    check(longint'(acc_sin) == es && longint'(acc_cos) == ec,
          $sformatf("acc %0d/%0d expected %0d/%0d", acc_sin, acc_cos, es, ec));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); #1;
    check(acc_sin == 0 && acc_cos == 0, "reset value");
    for (int p = 0; p < 6; p++) begin
      @(negedge clk); clear = 1'b1; en = 1'b1; es = 0; ec = 0;
      @(posedge clk); #1;
      check(acc_sin == 0 && acc_cos == 0, "clear wins over en");
      @(negedge clk); clear = 1'b0; en = 1'b0;
      for (int n = 0; n < 256; n++) step(p == 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
