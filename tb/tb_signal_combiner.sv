// tb_signal_combiner: 16-bit signed sum of tone and noise, one clock later.
module tb_signal_combiner;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic signed [7:0] tone = 0, noise = 0;
  logic signed [15:0] signal;
  int expected;

  signal_combiner dut (.clk, .rst_n, .tone, .noise, .signal);

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
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      tone  = 8'($urandom);
      noise = 8'($urandom);
      if (i == 0) begin tone = -128; noise = -128; end
      if (i == 1) begin tone = 127;  noise = 127;  end
      expected = int'(tone) + int'(noise);
      @(negedge clk);
      checks++;
      if (int'(signal) != expected) begin
        failures++;
        if (failures < 10) $display("i %0d: %0d expected %0d", i, signal, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
