// tb_freq_to_digit_lut: all 64 index pairs; a row/column pair in either
// order gives the key of the keypad grid, a same-group pair gives no digit.
module tb_freq_to_digit_lut;
  import dtmf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, idx_valid = 0;
  logic [2:0] idx_max = 0, idx_2nd = 0;
  logic [3:0] digit;
  logic digit_valid, digit_stb;
  int r, c;
  bit ok;

  freq_to_digit_lut dut (.clk, .rst_n, .idx_max, .idx_2nd, .idx_valid, .digit, .digit_valid, .digit_stb);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++) begin
      @(negedge clk);
      idx_max = 3'(a);
      idx_2nd = 3'(b);
      idx_valid = 1;
      ok = (a < 4) != (b < 4);
      r = (a < 4) ? a : b;
      c = (a < 4) ? b - 4 : a - 4;
      @(negedge clk);
      idx_valid = 0;
      checks += 2;
      if (!digit_stb || digit_valid != ok) begin
        failures++; $display("pair %0d %0d: valid %0d", a, b, digit_valid);
      end
      if (ok && int'(digit) != PAD_CODE[r][c]) begin
        failures++; $display("pair %0d %0d: digit %h expected %h", a, b, digit, PAD_CODE[r][c]);
      end
      @(negedge clk);
      checks++;
      if (digit_stb) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
