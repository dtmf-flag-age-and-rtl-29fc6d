// tb_dtmf_top_full: the DTMF chain at its default parameters (125 MHz clock
// divided by 15625 to 8 kHz sampling, blocks of 205 samples, shared-multiplier
// detector). Silence, then every key with noise added at half level, then
// release. Each decision must arrive 205*15625 clocks after the previous
// one; the second decision after a key change must give that key.
module tb_dtmf_top_full;
  import dtmf_ref_pkg::*;
  localparam longint BLOCK_CLOCKS = 205 * 15625;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] key_in = 0;
  logic key_valid = 0, noise_en = 0;
  logic [2:0] noise_shift = 0;
  logic sample_en, mag_valid, out_valid, out_stb;
  logic signed [7:0] signal_out, awgn_out;
  logic signed [15:0] signal;
  logic [11:0] cnt;
  logic [63:0] mag [8];
  logic [2:0] idx_max, idx_2nd;
  logic [3:0] out;
  longint unsigned cyc = 0, last_stb = 0;
  int detected = 0;

  dtmf_top dut (
    .clk, .rst_n, .key_in, .key_valid, .noise_en, .noise_shift, .sample_en, .signal_out,
    .awgn_out, .signal, .cnt, .mag, .mag_valid, .idx_max, .idx_2nd, .out, .out_valid, .out_stb);

  always #4 clk = ~clk;   // 125 MHz
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40 * BLOCK_CLOCKS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic next_decision();
    @(posedge clk iff out_stb);
    #1;
    if (last_stb != 0) begin
      checks++;
      if (cyc - last_stb != BLOCK_CLOCKS) begin failures++; $display("decision spacing %0d", cyc - last_stb); end
    end
    last_stb = cyc;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    next_decision();
    checks++;
    if (out_valid) begin failures++; $display("digit during silence"); end
    noise_en = 1;
    noise_shift = 1;
    for (int k = 0; k < 16; k++) begin
      key_in = 4'(k);
      key_valid = 1;
      next_decision();
      next_decision();
      checks++;
      if (out_valid && int'(out) == k) detected++;
      else begin failures++; $display("key %h: got %h valid %0d", k, out, out_valid); end
    end
    key_valid = 0;
    noise_en = 0;
    next_decision();
    next_decision();
    checks++;
    if (out_valid) begin failures++; $display("digit after release"); end
    $display("%0d of 16 keys detected", detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
