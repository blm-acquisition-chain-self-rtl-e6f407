// tb_iv_control: self-checking test of the instant value test sequencer.
//
// Sends strobes before, during and after an acquisition with random spacing and checks:
// no write while idle; exactly 256 writes at addresses 0..255 in order, starting with the
// first sample after the start clock; one corr_start pulse right after the 256th write; busy high
// from the clock after start until the clock after corr_done; no writes while
// processing; a start during processing is ignored. Runs three test cycles.
`timescale 1ns / 1ps
module tb_iv_control;
  import blm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, sample_valid = 1'b0, corr_done = 1'b0;
  logic busy, we, corr_start;
  logic [7:0] wr_addr;
  iv_state_t state;
  int checks = 0, failures = 0;

  iv_control dut (.clk, .rst_n, .start, .sample_valid, .corr_done, .busy, .we, .wr_addr, .corr_start, .state);

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
    int writes, cs;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3; cyc++) begin
      // idle strobes: nothing written
      repeat (20) begin
        @(negedge clk);
        sample_valid = 1'($urandom);
        #1 check(!we && !busy && !corr_start, "idle: no write, not busy");
      end
      // start request; a sample arriving in the start clock itself is not stored
      @(negedge clk);
      start = 1'b1; sample_valid = 1'b1;
      #1 check(!busy, "busy still low in the start clock");
      @(negedge clk);
      start = 1'b0;
      check(busy, "busy high the clock after start");
      writes = 0;
      while (writes < 256) begin
        sample_valid = 1'($urandom);
        #1;
        check(!corr_start, "no corr_start during acquisition");
        if (sample_valid) begin
          check(we && int'(wr_addr) == writes, $sformatf("write %0d at %0d", writes, wr_addr));
          writes++;
        end else check(!we, "write only with a sample");
        @(negedge clk);
      end
      sample_valid = 1'b0;
      #1 check(corr_start && busy, "corr_start right after the 256th write");
      // processing: strobes keep coming and must not be written; start is ignored
      cs = 0;
      repeat (50) begin
        @(negedge clk);
        sample_valid = 1'($urandom);
        start = 1'($urandom);
        #1;
        check(!we && busy, "processing: no writes, busy");
        if (corr_start) cs++;
      end
      check(cs == 0, "single corr_start pulse");
      start = 1'b0;
      corr_done = 1'b1;
      @(negedge clk);
      corr_done = 1'b0; sample_valid = 1'b0;
      #1 check(!busy && state == IV_IDLE, "busy low after corr_done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
