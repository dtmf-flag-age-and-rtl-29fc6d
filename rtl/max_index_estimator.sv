// max_index_estimator: finds the two strongest bins.
//
// When mag_valid is high the eight bin energies are compared and the index
// of the largest (idx_max) and of the second largest (idx_2nd) are
// registered; idx_valid pulses one clock later. Equal energies resolve to
// the lower index. A plain comparison scan, the simplest circuit for the
// published "max and 2nd max index estimator"; tie handling is this design's.
module max_index_estimator
  import dtmf_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  mag_vec_t mag,
  input  logic     mag_valid,
  output bin_t     idx_max,
  output bin_t     idx_2nd,
  output logic     idx_valid
);
  bin_t i1, i2;

  always_comb begin
    i1 = '0;
    for (int i = 1; i < NBINS; i++)
      if (mag[i] > mag[i1]) i1 = bin_t'(i);
    i2 = (i1 == 0) ? bin_t'(1) : bin_t'(0);
    for (int i = 0; i < NBINS; i++)
      if (bin_t'(i) != i1 && mag[i] > mag[i2]) i2 = bin_t'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_max   <= '0;
      idx_2nd   <= '0;
      idx_valid <= 1'b0;
    end else begin
      idx_valid <= mag_valid;
      if (mag_valid) begin
        idx_max <= i1;
        idx_2nd <= i2;
      end
    end
  end
endmodule
