// tb_goertzel_shared: blocks of 205 samples (each key's two tones with noise,
// plus random data) into the eight-bin detector. All eight energies must
// equal the integer reference model, the row and column bins of the key
// must be the strongest of their groups, mag_valid must rise on the
// 40th clock edge after the edge that takes a block's last sample, and
// 'cnt' must count the samples of the block.
module tb_goertzel_shared;
  import dtmf_ref_pkg::*;
  localparam int N = 205;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sample_en = 0;
  logic signed [15:0] x = 0;
  logic [11:0] cnt;
  logic busy;
  logic [63:0] mag [8];
  logic mag_valid;
  int xs[$];
  longint expected [8];
  int lat, best_r, best_c;

  goertzel_shared dut (.clk, .rst_n, .sample_en, .x, .cnt, .busy, .mag, .mag_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 18; k++) begin
      xs.delete();
      for (int n = 0; n < N; n++) begin
        if (k < 16)
          xs.push_back(int'($floor(63.0 * $cos(2.0 * M_PI * ROW_HZ[key_row(k)] * n / FS) + 0.5))
                     + int'($floor(63.0 * $cos(2.0 * M_PI * COL_HZ[key_col(k)] * n / FS) + 0.5))
                     + int'($urandom % 61) - 30);
        else
          xs.push_back(int'($urandom % 511) - 255);
      end
      for (int b = 0; b < 8; b++) expected[b] = ref_energy(ref_coef(bin_hz(b)), xs);
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        checks++;
        if (cnt != 12'(n)) begin failures++; $display("cnt %0d expected %0d", cnt, n); end
        x = 16'(xs[n]);
        sample_en = 1;
        @(posedge clk);
        #1 sample_en = 0;
        if (n == N - 1) break;
        repeat (46 + $urandom % 3) @(negedge clk);
      end
      lat = 0;
      do begin
        @(posedge clk); #1;
        lat++;
      end while (!mag_valid && lat < 200);
      checks++;
      if (lat != 40) begin failures++; $display("block %0d: latency %0d expected 40", k, lat); end
      for (int b = 0; b < 8; b++) begin
        checks++;
        if (mag[b] != 64'(expected[b])) begin
          failures++;
          $display("block %0d bin %0d: mag %0d expected %0d", k, b, mag[b], expected[b]);
        end
      end
      if (k < 16) begin
        best_r = 0; best_c = 4;
        for (int b = 1; b < 4; b++) if (mag[b] > mag[best_r]) best_r = b;
        for (int b = 5; b < 8; b++) if (mag[b] > mag[best_c]) best_c = b;
        checks++;
        if (best_r != key_row(k) || best_c != 4 + key_col(k)) begin
          failures++;
          $display("key %0d: strongest bins %0d %0d", k, best_r, best_c);
        end
      end
      repeat (50) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
