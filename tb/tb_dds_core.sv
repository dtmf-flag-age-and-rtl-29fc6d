// tb_dds_core: both channels follow a phase model; each tone sample equals
// the cosine table value at the top 8 phase bits, one clock after the step.
module tb_dds_core;
  import dtmf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] inc_low = 0, inc_high = 0;
  logic signed [7:0] tone1, tone2;
  int unsigned ph_l = 0, ph_h = 0;

  dds_core dut (.clk, .rst_n, .en, .inc_low, .inc_high, .tone1, .tone2);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int blk = 0; blk < 8; blk++) begin
      @(negedge clk);
      inc_low  = 16'(ref_inc(ROW_HZ[blk % 4]));
      inc_high = 16'(ref_inc(COL_HZ[(blk + 1) % 4]));
      repeat (2) @(negedge clk);      // delta-p register loaded
      for (int s = 0; s < 100; s++) begin
        en = 1;
        @(negedge clk);
        en = 0;
        ph_l = (ph_l + inc_low) % 65536;
        ph_h = (ph_h + inc_high) % 65536;
        @(negedge clk);               // table read done
        checks += 2;
        if (int'(tone1) != ref_cos(int'(ph_l >> 8)) || int'(tone2) != ref_cos(int'(ph_h >> 8))) begin
          failures++;
          if (failures < 10) $display("blk %0d s %0d: tones %0d %0d expected %0d %0d", blk, s,
                                      tone1, tone2, ref_cos(int'(ph_l >> 8)), ref_cos(int'(ph_h >> 8)));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
