// goertzel_shared: frequency detection block with resource sharing.
//
// The same eight Goertzel bins as goertzel_bank, but computed by a single
// signed multiplier and one accumulator, scheduled by a state machine. The
// sixteen filter states (s1, s2 per bin) live in small register arrays.
//   IDLE    wait for a sample strobe; latch the sample and the 'last' flag.
//   UPDATE  8 clocks, one bin each: s0 = x + (c*s1 >>> 14) - s2.
//   ENERGY  only after a block's last sample: 4 clocks per bin, 32 in all,
//           each using the one multiplier once:
//             step 0  t   = c*s1 >>> 14
//             step 1  acc = s1*s1
//             step 2  acc = acc + s2*s2
//             step 3  mag = acc - t*s2   (clamped at 0), state cleared
// After the last bin mag_valid pulses for one clock and the machine returns
// to IDLE. Timing: mag_valid is set on the 40th clock edge after the edge
// that takes the block's last sample. Strobes must be at least 9 clocks
// apart, and the strobe after a block's last sample at least 41 clocks after
// it (asserted): a strobe is only accepted in IDLE.
// busy is high outside IDLE. The arithmetic is bit-exact with goertzel_filter.
// Sharing one multiplier under a scheduling state machine is the published
// idea; the schedule itself is this design's.
module goertzel_shared
  import dtmf_pkg::*;
#(
  parameter int N = 205
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample_en,
  input  sample_t          x,
  output logic [CNT_W-1:0] cnt,
  output logic             busy,
  output mag_vec_t         mag,
  output logic             mag_valid
);
  typedef enum logic [1:0] {IDLE, UPDATE, ENERGY} state_e;

  localparam coef_t COEFS [NBINS] = '{
    goertzel_coef(0), goertzel_coef(1), goertzel_coef(2), goertzel_coef(3),
    goertzel_coef(4), goertzel_coef(5), goertzel_coef(6), goertzel_coef(7)};

  state_e     state;
  bin_t       bin;
  logic [1:0] step;
  sample_t    x_q;
  logic       last_q;
  logic       last;
  acc_t       s1 [NBINS];
  acc_t       s2 [NBINS];
  acc_t       t_q;
  logic signed [2*ACC_W-1:0] acc;

  // The shared multiplier and its operand multiplexers.
  acc_t                      mul_a, mul_b;
  logic signed [2*ACC_W-1:0] product;
  acc_t                      fb, s0;
  logic signed [2*ACC_W-1:0] energy;

  goertzel_control #(.N(N)) u_ctrl (.clk, .rst_n, .sample_en, .cnt, .last);

  always_comb begin
    mul_a = acc_t'(COEFS[bin]);
    mul_b = s1[bin];
    if (state == ENERGY) begin
      unique case (step)
        2'd0: begin mul_a = acc_t'(COEFS[bin]); mul_b = s1[bin]; end
        2'd1: begin mul_a = s1[bin];            mul_b = s1[bin]; end
        2'd2: begin mul_a = s2[bin];            mul_b = s2[bin]; end
        default: begin mul_a = t_q;             mul_b = s2[bin]; end
      endcase
    end
    product = mul_a * mul_b;
    fb      = acc_t'(product >>> COEF_FRAC);
    s0      = acc_t'(x_q) + fb - s2[bin];
    energy  = acc - product;
  end

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      bin       <= '0;
      step      <= '0;
      x_q       <= '0;
      last_q    <= 1'b0;
      t_q       <= '0;
      acc       <= '0;
      mag_valid <= 1'b0;
      for (int b = 0; b < NBINS; b++) begin
        s1[b]  <= '0;
        s2[b]  <= '0;
        mag[b] <= '0;
      end
    end else begin
      mag_valid <= 1'b0;
      unique case (state)
        IDLE: if (sample_en) begin
          x_q    <= x;
          last_q <= last;
          bin    <= '0;
          state  <= UPDATE;
        end
        UPDATE: begin
          s1[bin] <= s0;
          s2[bin] <= s1[bin];
          bin     <= bin + 1'b1;
          if (bin == bin_t'(NBINS - 1)) begin
            step  <= '0;
            state <= last_q ? ENERGY : IDLE;
          end
        end
        default: begin  // ENERGY
          step <= step + 1'b1;
          unique case (step)
            2'd0: t_q <= fb;
            2'd1: acc <= product;
            2'd2: acc <= acc + product;
            default: begin
              mag[bin] <= energy[2*ACC_W-1] ? '0 : mag_t'(energy);
              s1[bin]  <= '0;
              s2[bin]  <= '0;
              bin      <= bin + 1'b1;
              if (bin == bin_t'(NBINS - 1)) begin
                mag_valid <= 1'b1;
                state     <= IDLE;
              end
            end
          endcase
        end
      endcase
    end
  end

  a_strobe_when_idle: assert property (@(posedge clk) disable iff (!rst_n) sample_en |-> state == IDLE)
    else $error("goertzel_shared: sample strobe while busy");
endmodule
