// tb_awgn_gen: noise samples match an xorshift / four-field-sum model
// exactly; at full level the mean is near zero and the standard deviation
// near 37 (sum of four uniform 0..63 values); noise_en = 0 gives zero.
module tb_awgn_gen;
  import dtmf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, noise_en = 0;
  logic [2:0] shift = 0;
  logic signed [7:0] noise;
  int unsigned st = 32'h1234_5678;
  int expected;
  real sum = 0, sumsq = 0, mean, sd;
  int n = 0;

  awgn_gen dut (.clk, .rst_n, .en, .noise_en, .shift, .noise);

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
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      noise_en = (i % 1000) < 900;
      shift    = (i < 3000) ? 3'd0 : 3'(i / 700);
      en = 1;
      @(negedge clk);
      en = 0;
      st = xorshift(st);
      expected = noise_en ? ref_noise(st, int'(shift)) : 0;
      checks++;
      if (int'(noise) != expected) begin
        failures++;
        if (failures < 10) $display("i %0d: noise %0d expected %0d", i, noise, expected);
      end
      if (noise_en && shift == 0) begin
        n++;
        sum += real'(noise);
        sumsq += real'(noise) * real'(noise);
      end
    end
    mean = sum / n;
    sd = $sqrt(sumsq / n - mean * mean);
    $display("noise mean %f sd %f over %0d samples", mean, sd, n);
    checks += 2;
    if (mean > 3.0 || mean < -3.0) failures++;
    if (sd < 32.0 || sd > 42.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
