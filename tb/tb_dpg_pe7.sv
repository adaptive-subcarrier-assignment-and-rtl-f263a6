// Self-checking testbench of PE7 (Step 10): sigma(j+1) = eta * sigma(j),
// together with the reciprocal 1/sigma(j+1) = (1/eta) / sigma(j).  Starting
// from sigma = 1 it applies the update repeatedly and compares each result
// with integer arithmetic and, loosely, with eta^j.
module tb_dpg_pe7;
  import dpg_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0;
  fx_t cfg_eta = 0, cfg_inv_eta = 0;
  sigma_t sig = '0, sig_nx;
  int checks = 0, failures = 0;
  dpg_pe7 dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint es, ei;
    real ideal;
    @(negedge clk); cfg_we = 1; cfg_eta = 16'sd205; cfg_inv_eta = 16'sd320; // 0.8, 1.25
    @(negedge clk); cfg_we = 0;
    sig.sigma = 16'sd256; sig.inv_sigma = 16'sd256; ideal = 1.0;
    for (int j = 0; j < 12; j++) begin
      #1;
      es = (longint'(sig.sigma) * 205) >>> 8;
      ei = (longint'(sig.inv_sigma) * 320) >>> 8;
      if (ei > 32767) ei = 32767;
      ideal = ideal * 0.8;
      checks += 3;
      if (longint'(sig_nx.sigma) != es) begin failures++; $display("sigma got %0d exp %0d", sig_nx.sigma, es); end
      if (longint'(sig_nx.inv_sigma) != ei) begin failures++; $display("inv got %0d exp %0d", sig_nx.inv_sigma, ei); end
      if (real'(sig_nx.sigma) / 256.0 > ideal + 0.05 || real'(sig_nx.sigma) / 256.0 < ideal - 0.05) begin
        failures++; $display("sigma %f far from eta^j %f", real'(sig_nx.sigma) / 256.0, ideal);
      end
      @(negedge clk); sig = sig_nx;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
