// Self-checking testbench of PE3 (Step 8): lambda_n^p(t+1) =
// lambda_n^p(t) + beta * (sum rho_hat - 1).  The expected value is computed
// with integer arithmetic (product floored to 8 fraction bits, result
// saturated to 16 bits) for random operands, including saturating ones.
module tb_dpg_pe3;
  import dpg_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0;
  fx_t cfg_beta = 0, grad = 0, lam_p = 0, lam_p_nx;
  int checks = 0, failures = 0;
  dpg_pe3 dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint e;
    for (int b = 0; b < 4; b++) begin
      @(negedge clk); cfg_we = 1; cfg_beta = fx_t'(32 + 48 * b); @(negedge clk); cfg_we = 0;
      for (int i = 0; i < 300; i++) begin
        grad  = fx_t'($urandom);
        lam_p = fx_t'($urandom);
        if (i % 2 == 0) begin grad = fx_t'(int'($urandom_range(1024)) - 512); lam_p = fx_t'(int'($urandom_range(4096)) - 2048); end
        #1;
        e = longint'(lam_p) + ((longint'(cfg_beta) * longint'(grad)) >>> 8);
        if (e > 32767) e = 32767;
        if (e < -32768) e = -32768;
        checks++;
        if (longint'(lam_p_nx) != e) begin
          failures++; $display("beta=%0d grad=%0d lam=%0d: got %0d exp %0d", cfg_beta, grad, lam_p, lam_p_nx, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
