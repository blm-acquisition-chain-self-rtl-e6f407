// tb_sample_ram: self-checking test of the period buffer.
//
// Fills all 256 words with random data, reads them back in random order and checks each
// word one clock after its address (registered read), then rewrites half of them while
// reading others and checks again against a shadow array kept by the testbench.
`timescale 1ns / 1ps
module tb_sample_ram;
  localparam int W = 18, D = 256;

  logic clk = 1'b0, we = 1'b0;
  logic [7:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [W-1:0] shadow [D];
  int checks = 0, failures = 0;

  sample_ram #(.WIDTH(W), .DEPTH(D)) dut (.clk, .we, .wr_addr, .wr_data, .rd_addr, .rd_data);

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
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1'b1; wr_addr = 8'(a); wr_data = W'($urandom); shadow[a] = wr_data;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 1024; i++) begin
      rd_addr = 8'($urandom);
      @(negedge clk);
      check(rd_data == shadow[rd_addr], $sformatf("read %0d: %h vs %h", rd_addr, rd_data, shadow[rd_addr]));
    end
    // writes and reads interleaved, write address never equal to read address
    for (int i = 0; i < 1024; i++) begin
      rd_addr = 8'($urandom);
      wr_addr = rd_addr + 8'd1 + 8'($urandom_range(0, 200));
      we = 1'($urandom);
      wr_data = W'($urandom);
      @(negedge clk);
      check(rd_data == shadow[rd_addr], $sformatf("mixed read %0d", rd_addr));
      if (we) shadow[wr_addr] = wr_data;
    end
    we = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
