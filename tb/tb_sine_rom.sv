// tb_sine_rom: self-checking test of the reference tables.
//
// Compares every entry of both tables with 128*sin and 128*cos computed here in double
// precision (within 0.5), and checks the properties the long term analysis relies on:
// peaks of +128 and -128, sin[i+128] = -sin[i], cos[i] = sin[i+64], and zero sum over a
// period (so a DC offset on the correlated signal cancels).
`timescale 1ns / 1ps
module tb_sine_rom;
  logic [7:0] addr = '0;
  logic signed [8:0] sin_q, cos_q;
  int checks = 0, failures = 0;
  int sum_s = 0, sum_c = 0, mx = -1000, mn = 1000;
  logic signed [8:0] s_tab [256], c_tab [256];

  sine_rom dut (.addr, .sin_q, .cos_q);

  initial begin
    #1_000_000;
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
    real es, ec;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      #1;
      s_tab[i] = sin_q; c_tab[i] = cos_q;
      es = real'(sin_q) - 128.0 * $sin(2.0 * 3.14159265358979 * i / 256.0);
      ec = real'(cos_q) - 128.0 * $cos(2.0 * 3.14159265358979 * i / 256.0);
      check(es <= 0.5 && es >= -0.5, $sformatf("sin[%0d]=%0d", i, sin_q));
      check(ec <= 0.5 && ec >= -0.5, $sformatf("cos[%0d]=%0d", i, cos_q));
      sum_s += int'(sin_q); sum_c += int'(cos_q);
      if (int'(sin_q) > mx) mx = int'(sin_q);
      if (int'(sin_q) < mn) mn = int'(sin_q);
    end
    for (int i = 0; i < 256; i++) begin
      check(s_tab[(i + 128) % 256] == -s_tab[i], $sformatf("odd symmetry at %0d", i));
      check(c_tab[i] == s_tab[(i + 64) % 256], $sformatf("quadrature at %0d", i));
    end
    check(sum_s == 0 && sum_c == 0, $sformatf("period sums %0d %0d", sum_s, sum_c));
    check(mx == 128 && mn == -128, $sformatf("peaks %0d %0d", mx, mn));
    check(s_tab[0] == 0 && c_tab[0] == 128 && s_tab[64] == 128, "origin values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
