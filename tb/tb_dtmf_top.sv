// tb_dtmf_top: end-to-end test of the DTMF chain, run with both frequency
// detection blocks side by side (shared-multiplier and parallel), at a
// sample divider of 48 clocks so that a block of 205 samples takes 9840
// clocks. Every key is pressed without noise and with noise, plus silence.
// After each key change the first decision is skipped (its block straddles
// the change) and the next must give the pressed key. Also checked: both
// detectors give bit-identical energies, decisions come every N*SAMPLE_DIV
// clocks, and silence gives no digit. The events exercised are counted and
// each must occur.
module tb_dtmf_top;
  import dtmf_ref_pkg::*;
  localparam int DIV = 48;
  localparam int N   = 205;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] key_in = 0;
  logic key_valid = 0, noise_en = 0;
  logic [2:0] noise_shift = 0;

  logic sample_en [2];
  logic signed [7:0] signal_out [2], awgn_out [2];
  logic signed [15:0] signal [2];
  logic [11:0] cnt [2];
  logic [63:0] mag_s [8], mag_p [8];
  logic mag_valid [2];
  logic [2:0] idx_max [2], idx_2nd [2];
  logic [3:0] out [2];
  logic out_valid [2], out_stb [2];

  // event counters
  int key_seen [16];
  int n_noisy_ok = 0, n_quiet_ok = 0, n_silence = 0, n_agree = 0, n_shared_busy = 0, n_period_ok = 0;
  longint unsigned cyc = 0, last_stb = 0;

  dtmf_top #(.SAMPLE_DIV(DIV), .N(N), .RESOURCE_SHARING(1'b1)) u_rsa (
    .clk, .rst_n, .key_in, .key_valid, .noise_en, .noise_shift,
    .sample_en(sample_en[0]), .signal_out(signal_out[0]), .awgn_out(awgn_out[0]), .signal(signal[0]),
    .cnt(cnt[0]), .mag(mag_s), .mag_valid(mag_valid[0]), .idx_max(idx_max[0]), .idx_2nd(idx_2nd[0]),
    .out(out[0]), .out_valid(out_valid[0]), .out_stb(out_stb[0]));

  dtmf_top #(.SAMPLE_DIV(DIV), .N(N), .RESOURCE_SHARING(1'b0)) u_par (
    .clk, .rst_n, .key_in, .key_valid, .noise_en, .noise_shift,
    .sample_en(sample_en[1]), .signal_out(signal_out[1]), .awgn_out(awgn_out[1]), .signal(signal[1]),
    .cnt(cnt[1]), .mag(mag_p), .mag_valid(mag_valid[1]), .idx_max(idx_max[1]), .idx_2nd(idx_2nd[1]),
    .out(out[1]), .out_valid(out_valid[1]), .out_stb(out_stb[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Decisions of the parallel design, which finishes earlier in each block.
  logic [3:0] par_out = 0;
  logic par_valid = 0;
  int par_count = 0;
  always @(posedge clk) if (out_stb[1]) begin
    par_out   <= out[1];
    par_valid <= out_valid[1];
    par_count <= par_count + 1;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (u_rsa.g_shared.busy) n_shared_busy <= n_shared_busy + 1;
  end

  // Wait for the next decision of the shared-detector design and check the
  // parallel one against it.
  task automatic next_decision();
    @(posedge clk iff out_stb[0]);
    #1;
    checks += 2;
    if (last_stb != 0) begin
      if (cyc - last_stb != longint'(N * DIV)) begin
        failures++; $display("decision spacing %0d", cyc - last_stb);
      end else n_period_ok++;
    end
    last_stb = cyc;
    if (par_count == 0 || par_out != out[0] || par_valid != out_valid[0]) begin
      failures++; $display("detectors disagree: %h/%0d vs %h/%0d", out[0], out_valid[0], par_out, par_valid);
    end
    begin
      bit same = 1;
      for (int b = 0; b < 8; b++) if (mag_s[b] != mag_p[b]) same = 0;
      if (same) n_agree++;
      else begin failures++; $display("energies differ"); end
    end
  endtask

  task automatic press(input int k, input bit noisy, input int shift);
    key_in = 4'(k);
    key_valid = 1;
    noise_en = noisy;
    noise_shift = 3'(shift);
    next_decision();          // block straddling the change
    next_decision();
    checks++;
    if (out_valid[0] && int'(out[0]) == k) begin
      key_seen[k]++;
      if (noisy) n_noisy_ok++; else n_quiet_ok++;
    end else begin
      failures++;
      $display("key %h noise %0d/%0d: got %h valid %0d (bins %0d %0d)", k, noisy, shift, out[0], out_valid[0],
               idx_max[0], idx_2nd[0]);
    end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    // silence
    next_decision();
    next_decision();
    checks++;
    if (!out_valid[0]) n_silence++; else begin failures++; $display("digit during silence"); end
    for (int k = 0; k < 16; k++) press(k, 1'b0, 0);
    for (int k = 0; k < 16; k++) press(15 - k, 1'b1, 1);
    for (int k = 0; k < 4; k++) press(k * 5, 1'b1, 0);
    // release: silence again
    key_valid = 0;
    noise_en = 0;
    next_decision();
    next_decision();
    checks++;
    if (!out_valid[0]) n_silence++; else begin failures++; $display("digit after release"); end

    $display("events: quiet keys %0d, noisy keys %0d, silence %0d, detectors agree %0d, shared busy clocks %0d, spacing ok %0d",
             n_quiet_ok, n_noisy_ok, n_silence, n_agree, n_shared_busy, n_period_ok);
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (key_seen[k] == 0) begin failures++; $display("key %h never detected", k); end
    end
    checks += 5;
    if (n_quiet_ok == 0) failures++;
    if (n_noisy_ok == 0) failures++;
    if (n_silence == 0) failures++;
    if (n_agree == 0) failures++;
    if (n_shared_busy == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
