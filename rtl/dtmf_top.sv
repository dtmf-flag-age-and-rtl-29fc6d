// dtmf_top: DTMF tone generation and Goertzel detection on one chip.
//
// Chain: key code -> dtmf_signal_gen (two-tone DDS) -> signal_combiner adds
// awgn_gen noise -> frequency detection block -> max_index_estimator ->
// freq_to_digit_lut -> out. A divider makes a one-clock sample strobe every
// SAMPLE_DIV clocks (125 MHz / 15625 = 8 kHz by default); generator, noise
// source and detector all advance on it. The detector reads 'signal' on the
// strobe, i.e. the sample built from the previous strobe.
// RESOURCE_SHARING selects the frequency detection block: 1 (default) the
// shared-multiplier scheduled detector goertzel_shared, 0 the eight parallel
// filters of goertzel_bank. Both give identical energies.
// Every N samples a detection completes: mag/mag_valid, then idx_* one clock
// later, then out/out_valid and the out_stb pulse one clock after that.
// The internal signals a logic analyser would probe (generator output, noise,
// detector input and outputs) are brought out as ports.
// The block chain follows the published system diagram; the clock and
// sample rates, N and the number formats are this design's choices.
module dtmf_top
  import dtmf_pkg::*;
#(
  parameter int SAMPLE_DIV       = 15625,
  parameter int N                = 205,
  parameter bit RESOURCE_SHARING = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  key_t             key_in,
  input  logic             key_valid,
  input  logic             noise_en,
  input  logic [2:0]       noise_shift,
  output logic             sample_en,
  output logic signed [7:0] signal_out,
  output logic signed [7:0] awgn_out,
  output sample_t          signal,
  output logic [CNT_W-1:0] cnt,
  output mag_vec_t         mag,
  output logic             mag_valid,
  output bin_t             idx_max,
  output bin_t             idx_2nd,
  output key_t             out,
  output logic             out_valid,
  output logic             out_stb
);
  localparam int DIV_W = $clog2(SAMPLE_DIV + 1);

  if (SAMPLE_DIV < 48) begin : g_bad_div
    $error("dtmf_top: SAMPLE_DIV must be at least 48");
  end

  // Sample strobe.
  logic [DIV_W-1:0] div_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt   <= '0;
      sample_en <= 1'b0;
    end else begin
      sample_en <= (div_cnt == DIV_W'(SAMPLE_DIV - 1));
      div_cnt   <= (div_cnt == DIV_W'(SAMPLE_DIV - 1)) ? '0 : div_cnt + 1'b1;
    end
  end

  dtmf_signal_gen u_gen (
    .clk, .rst_n, .en(sample_en), .key(key_in), .key_valid, .signal_out);

  awgn_gen u_noise (
    .clk, .rst_n, .en(sample_en), .noise_en, .shift(noise_shift), .noise(awgn_out));

  signal_combiner u_add (.clk, .rst_n, .tone(signal_out), .noise(awgn_out), .signal);

  if (RESOURCE_SHARING) begin : g_shared
    logic busy;
    goertzel_shared #(.N(N)) u_fdb (
      .clk, .rst_n, .sample_en, .x(signal), .cnt, .busy, .mag, .mag_valid);
  end else begin : g_parallel
    goertzel_bank #(.N(N)) u_fdb (
      .clk, .rst_n, .sample_en, .x(signal), .cnt, .mag, .mag_valid);
  end

  logic idx_valid;

  max_index_estimator u_max (.clk, .rst_n, .mag, .mag_valid, .idx_max, .idx_2nd, .idx_valid);

  freq_to_digit_lut u_lut (
    .clk, .rst_n, .idx_max, .idx_2nd, .idx_valid,
    .digit(out), .digit_valid(out_valid), .digit_stb(out_stb));
endmodule
