// tb_cos_lut: every table entry equals round(63 * cos(2*pi*i/256)), one
// clock after the address is applied.
module tb_cos_lut;
  import dtmf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [7:0] addr = 0;
  logic signed [7:0] cos_out;

  cos_lut dut (.clk, .addr, .cos_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      addr = 8'(i);
      @(posedge clk);
      #1;
      checks++;
      if (int'(cos_out) != ref_cos(i)) begin
        failures++;
        $display("addr %0d: %0d expected %0d", i, cos_out, ref_cos(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
