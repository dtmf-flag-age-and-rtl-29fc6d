// dds_core: two-channel direct digital synthesizer.
//
// Each channel is a phase accumulator followed by the cosine carrier table;
// the low channel produces the row tone (Tone 1), the high channel the
// column tone (Tone 2). The table is addressed by the top ADDR_W bits of the
// phase. Timing: the phase steps on the edge where en is high and the tone
// samples follow one clock later (registered table read). Two independent
// channels as in the published generator diagram; widths are this design's.
module dds_core #(
  parameter int PHASE_W   = 16,
  parameter int ADDR_W    = 8,
  parameter int AMP_W     = 8,
  parameter int AMPLITUDE = 63
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [PHASE_W-1:0]      inc_low,
  input  logic [PHASE_W-1:0]      inc_high,
  output logic signed [AMP_W-1:0] tone1,
  output logic signed [AMP_W-1:0] tone2
);
  logic [PHASE_W-1:0] phase_low, phase_high;

  phase_accumulator #(.PHASE_W(PHASE_W)) u_acc_low (
    .clk, .rst_n, .en, .inc(inc_low), .phase(phase_low));
  phase_accumulator #(.PHASE_W(PHASE_W)) u_acc_high (
    .clk, .rst_n, .en, .inc(inc_high), .phase(phase_high));

  cos_lut #(.ADDR_W(ADDR_W), .AMP_W(AMP_W), .AMPLITUDE(AMPLITUDE)) u_lut_low (
    .clk, .addr(phase_low[PHASE_W-1 -: ADDR_W]), .cos_out(tone1));
  cos_lut #(.ADDR_W(ADDR_W), .AMP_W(AMP_W), .AMPLITUDE(AMPLITUDE)) u_lut_high (
    .clk, .addr(phase_high[PHASE_W-1 -: ADDR_W]), .cos_out(tone2));
endmodule
