// tb_goertzel_control: the counter runs 0..N-1 on strobes only, and 'last'
// is high exactly on every N-th sample.
module tb_goertzel_control;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sample_en = 0;
  logic [11:0] cnt;
  logic last;
  int samples = 0, lasts = 0;

  goertzel_control dut (.clk, .rst_n, .sample_en, .cnt, .last);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3 * 205 + 17; i++) begin
      @(negedge clk);
      checks += 2;
      if (cnt != 12'(samples % 205)) begin
        failures++;
        if (failures < 10) $display("sample %0d: cnt %0d", samples, cnt);
      end
      if (last != ((samples % 205) == 204)) failures++;
      if (last) lasts++;
      sample_en = 1;
      @(negedge clk);
      sample_en = 0;
      samples++;
      repeat ($urandom % 3) @(negedge clk);
    end
    checks++;
    if (lasts != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
