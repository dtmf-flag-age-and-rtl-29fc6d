// tb_tones_generator: registered sum of two tones, zero while disabled.
module tb_tones_generator;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, tone_en = 0;
  logic signed [7:0] tone1 = 0, tone2 = 0, tone;
  int expected;

  tones_generator dut (.clk, .rst_n, .tone_en, .tone1, .tone2, .tone);

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
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      tone1   = 8'($signed(int'($urandom % 127) - 63));
      tone2   = 8'($signed(int'($urandom % 127) - 63));
      tone_en = ($urandom % 4) != 0;
      expected = tone_en ? int'(tone1) + int'(tone2) : 0;
      @(negedge clk);
      checks++;
      if (int'(tone) != expected) begin
        failures++;
        if (failures < 10) $display("i %0d: tone %0d expected %0d", i, tone, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
