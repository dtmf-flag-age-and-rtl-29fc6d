// tb_phase_accumulator: random increments and strobes against a model of the
// delta-p register and the wrapping phase register.
module tb_phase_accumulator;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] inc = 0, phase;
  logic [15:0] m_delta = 0, m_phase = 0;

  phase_accumulator dut (.clk, .rst_n, .en, .inc, .phase);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      // model of the edge just taken
      if (i > 0) begin
        if (en) m_phase = m_phase + m_delta;
        m_delta = inc;
      end
      #1;
      checks++;
      if (phase !== m_phase) begin
        failures++;
        if (failures < 10) $display("cycle %0d: phase %0d expected %0d", i, phase, m_phase);
      end
      if (i % 50 == 0) inc = 16'($urandom);
      en = ($urandom % 3) == 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
