// tb_dtmf_offset: frequency-tolerance workload. Tones of every key are
// shifted by -1.5 %, 0 and +1.5 % (both tones the same way, and in opposite
// ways), noise is added, and the samples go through the shared-multiplier
// detector, the max/2nd-max estimator and the digit lookup. Every block must
// decode to the pressed key.
module tb_dtmf_offset;
  import dtmf_ref_pkg::*;
  localparam int N = 205;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sample_en = 0;
  logic signed [15:0] x = 0;
  logic [11:0] cnt;
  logic busy, mag_valid, idx_valid, digit_valid, digit_stb;
  logic [63:0] mag [8];
  logic [2:0] idx_max, idx_2nd;
  logic [3:0] digit;
  real fr, fc;
  int ok = 0;
  localparam real OFS [3] = '{-0.015, 0.0, 0.015};

  goertzel_shared #(.N(N)) u_fdb (.clk, .rst_n, .sample_en, .x, .cnt, .busy, .mag, .mag_valid);
  max_index_estimator u_max (.clk, .rst_n, .mag, .mag_valid, .idx_max, .idx_2nd, .idx_valid);
  freq_to_digit_lut u_lut (.clk, .rst_n, .idx_max, .idx_2nd, .idx_valid, .digit, .digit_valid, .digit_stb);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 16; k++)
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) begin
          fr = ROW_HZ[key_row(k)] * (1.0 + OFS[a]);
          fc = COL_HZ[key_col(k)] * (1.0 + OFS[b]);
          for (int n = 0; n < N; n++) begin
            @(negedge clk);
            x = 16'(int'($floor(63.0 * $cos(2.0 * M_PI * fr * n / FS) + 63.0 * $cos(2.0 * M_PI * fc * n / FS)
                                + 0.5)) + int'($urandom % 61) - 30);
            sample_en = 1;
            @(negedge clk);
            sample_en = 0;
            if (n == N - 1) break;
            repeat (10) @(negedge clk);
          end
          @(posedge clk iff digit_stb);
          #1;
          checks++;
          if (digit_valid && int'(digit) == k) ok++;
          else begin
            failures++;
            $display("key %h offsets %f %f: got %h valid %0d", k, OFS[a], OFS[b], digit, digit_valid);
          end
          repeat (5) @(negedge clk);
        end
    $display("%0d of %0d offset blocks decoded", ok, checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
