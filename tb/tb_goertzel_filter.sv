// tb_goertzel_filter: blocks of 205 samples (random, on-bin and off-bin
// tones) for each of the eight coefficients; the energy must equal the
// integer reference model and appear on the clock edge after the edge that
// takes the block's last sample.
module tb_goertzel_filter;
  import dtmf_ref_pkg::*;
  localparam int N = 205;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sample_en = 0, last = 0;
  logic signed [15:0] x = 0, coef = 0;
  logic [63:0] mag;
  logic mag_valid;
  int xs[$];
  longint expected;
  int lat;

  goertzel_filter dut (.clk, .rst_n, .sample_en, .last, .x, .coef, .mag, .mag_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < 8; b++) begin
      for (int kind = 0; kind < 3; kind++) begin
        xs.delete();
        for (int n = 0; n < N; n++) begin
          case (kind)
            0: xs.push_back(int'($urandom % 511) - 255);
            1: xs.push_back(int'($floor(120.0 * $cos(2.0 * M_PI * bin_hz(b) * n / FS) + 0.5)));
            default: xs.push_back(int'($floor(120.0 * $cos(2.0 * M_PI * bin_hz((b + 3) % 8) * n / FS) + 0.5)));
          endcase
        end
        expected = ref_energy(ref_coef(bin_hz(b)), xs);
        @(negedge clk);
        coef = 16'(ref_coef(bin_hz(b)));
        for (int n = 0; n < N; n++) begin
          @(negedge clk);
          x = 16'(xs[n]);
          last = (n == N - 1);
          sample_en = 1;
          @(negedge clk);
          sample_en = 0;
          last = 0;
          checks++;
          if (mag_valid) begin failures++; $display("early mag_valid"); end
          if (n == N - 1) break;
          repeat ($urandom % 3) @(negedge clk);
        end
        // the strobe edge of the last sample has passed; mag_valid follows on the next edge
        lat = 1;
        @(posedge clk); #1;
        checks += 2;
        if (!mag_valid) begin failures++; $display("bin %0d kind %0d: no mag_valid one edge after last", b, kind); end
        if (mag != 64'(expected)) begin
          failures++;
          $display("bin %0d kind %0d: mag %0d expected %0d", b, kind, mag, expected);
        end
        @(posedge clk); #1;
        checks++;
        if (mag_valid) begin failures++; $display("mag_valid longer than one clock"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
