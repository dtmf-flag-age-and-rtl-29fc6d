// tb_max_index_estimator: random energy vectors (with deliberate ties)
// against a reference that sorts by energy, lower index first on ties.
module tb_max_index_estimator;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, mag_valid = 0;
  logic [63:0] mag [8];
  logic [2:0] idx_max, idx_2nd;
  logic idx_valid;
  int e1, e2;

  max_index_estimator dut (.clk, .rst_n, .mag, .mag_valid, .idx_max, .idx_2nd, .idx_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 8; b++) mag[b] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int b = 0; b < 8; b++)
        mag[b] = (i % 3 == 0) ? 64'($urandom % 4) : {32'($urandom), 32'($urandom)} >> ($urandom % 40);
      e1 = 0;
      for (int b = 1; b < 8; b++) if (mag[b] > mag[e1]) e1 = b;
      e2 = -1;
      for (int b = 0; b < 8; b++) if (b != e1 && (e2 < 0 || mag[b] > mag[e2])) e2 = b;
      mag_valid = 1;
      @(negedge clk);
      mag_valid = 0;
      checks += 3;
      if (!idx_valid) failures++;
      if (int'(idx_max) != e1 || int'(idx_2nd) != e2) begin
        failures++;
        if (failures < 10) $display("i %0d: %0d %0d expected %0d %0d", i, idx_max, idx_2nd, e1, e2);
      end
      @(negedge clk);
      if (idx_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
