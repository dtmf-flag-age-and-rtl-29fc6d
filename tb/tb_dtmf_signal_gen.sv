// tb_dtmf_signal_gen: for every key the generator output equals the sum of
// the row and column cosines of a phase model, three clocks after each
// strobe; with no key pressed it is zero.
module tb_dtmf_signal_gen;
  import dtmf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, key_valid = 0;
  logic [3:0] key = 0;
  logic signed [7:0] signal_out;
  int unsigned ph_l = 0, ph_h = 0;
  int expected;

  dtmf_signal_gen dut (.clk, .rst_n, .en, .key, .key_valid, .signal_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k <= 16; k++) begin
      @(negedge clk);
      key_valid = (k < 16);
      key = 4'(k);
      repeat (2) @(negedge clk);
      for (int s = 0; s < 60; s++) begin
        en = 1;
        @(negedge clk);
        en = 0;
        ph_l = (ph_l + ref_inc(ROW_HZ[key_row(int'(key))])) % 65536;
        ph_h = (ph_h + ref_inc(COL_HZ[key_col(int'(key))])) % 65536;
        repeat (2) @(negedge clk);
        expected = key_valid ? ref_cos(int'(ph_l >> 8)) + ref_cos(int'(ph_h >> 8)) : 0;
        checks++;
        if (int'(signal_out) != expected) begin
          failures++;
          if (failures < 10) $display("key %0d s %0d: %0d expected %0d", k, s, signal_out, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
