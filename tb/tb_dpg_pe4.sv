// Self-checking testbench of PE4 (Step 4): dphi/dlambda_k^r = R_k - sum_n
// r_hat_{k,n}.  Loads R_k for K users, drives N random projected rates and
// compares with an integer sum; N = 6 (not a power of two) exercises the
// padding of the adder tree.
module tb_dpg_pe4;
  import dpg_pkg::*;
  localparam int K = 4, N = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0;
  logic [1:0] cfg_k = 0, k = 0;
  fx_t cfg_rate = 0, grad;
  fx_t r_hat [N];
  int rates [K];
  int checks = 0, failures = 0;
  dpg_pe4 #(.K(K), .N(N)) dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int e;
    for (int i = 0; i < N; i++) r_hat[i] = '0;
    for (int i = 0; i < K; i++) begin
      @(negedge clk); cfg_we = 1; cfg_k = 2'(i); rates[i] = 256 * (3 + 5 * i); cfg_rate = fx_t'(rates[i]);
    end
    @(negedge clk); cfg_we = 0;
    for (int it = 0; it < 500; it++) begin
      k = 2'($urandom_range(K - 1));
      e = rates[k];
      for (int i = 0; i < N; i++) begin
        r_hat[i] = fx_t'($urandom_range(6 * 256)); e -= int'(r_hat[i]);
      end
      #1;
      checks++;
      if (int'(grad) != e) begin failures++; $display("k=%0d got %0d exp %0d", k, grad, e); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
