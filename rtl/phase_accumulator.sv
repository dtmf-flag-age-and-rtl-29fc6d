// phase_accumulator: the DDS phase accumulator.
//
// A phase increment register (delta p) is loaded from the frequency word
// selector every clock; on each sample strobe the phase register adds delta p
// and wraps modulo 2^PHASE_W. The phase therefore advances by f/FS of a turn
// per sample. Structure (increment register, adder, phase register with
// feedback) follows the published block diagram; loading delta p every clock
// and stepping on a strobe are this design's choices.
// Timing: phase updates on the clock edge where en is high, using the delta p
// registered on the previous edge. Reset (active low) clears both registers.
module phase_accumulator #(
  parameter int PHASE_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [PHASE_W-1:0] inc,
  output logic [PHASE_W-1:0] phase
);
  logic [PHASE_W-1:0] delta_p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      delta_p <= '0;
      phase   <= '0;
    end else begin
      delta_p <= inc;
      if (en) phase <= phase + delta_p;
    end
  end
endmodule
