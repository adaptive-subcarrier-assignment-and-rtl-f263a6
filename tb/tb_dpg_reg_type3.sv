// Self-checking testbench of the type-3 register: reads -1 (Q7.8) whenever
// first_k (k = 1) is high, otherwise the last value written while en was
// high.  Drives a repeating k = 1..K pattern like CT_k does, with en gaps.
module tb_dpg_reg_type3;
  import dpg_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, first_k = 0;
  fx_t d = 0, q, model;
  int checks = 0, failures = 0;
  dpg_reg_type3 dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk); en = 1; first_k = 1; d = 16'sd5;
    @(posedge clk); model = d;
    @(negedge clk);
    for (int i = 0; i < 600; i++) begin
      first_k = (i % 4 == 0); en = ($urandom_range(5) != 0); d = fx_t'($urandom);
      #1;
      checks++;
      if (q !== (first_k ? -16'sd256 : model)) begin
        failures++; $display("i=%0d got %0d exp %0d", i, q, first_k ? -256 : int'(model));
      end
      @(posedge clk);
      if (en) model = d;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
