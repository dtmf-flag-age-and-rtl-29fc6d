// tb_freq_word_selector: every key code gives the tuning words of its row
// and column tone, round(f * 65536 / 8000).
module tb_freq_word_selector;
  import dtmf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0]  key;
  logic [15:0] inc_low, inc_high;

  freq_word_selector dut (.key, .inc_low, .inc_high);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      key = 4'(k);
      #1;
      checks += 2;
      if (inc_low !== 16'(ref_inc(ROW_HZ[key_row(k)]))) begin
        failures++; $display("key %h: inc_low %0d expected %0d", k, inc_low, ref_inc(ROW_HZ[key_row(k)]));
      end
      if (inc_high !== 16'(ref_inc(COL_HZ[key_col(k)]))) begin
        failures++; $display("key %h: inc_high %0d expected %0d", k, inc_high, ref_inc(COL_HZ[key_col(k)]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
