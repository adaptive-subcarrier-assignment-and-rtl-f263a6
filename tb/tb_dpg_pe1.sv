// Self-checking testbench of PE1 (Step 2, closed-form unconstrained solution).
// Loads random channel constants for K users, then drives random multipliers
// and sigma and compares r~ and rho~ with a floating-point evaluation of
//   c* = max(0, log2(lambda^r alpha^2 / (B ln2))),
//   rho~ = -(lambda^p + (f(c*) - lambda^r alpha^2 c*)/alpha^2) / sigma,
//   r~ = rho~ c*,   f(c) = B(2^c - 1),
// within a tolerance that covers the Q7.8 rounding of the chain.
module tb_dpg_pe1;
  import dpg_pkg::*;
  localparam int K = 4;
  localparam real B = 1.0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0;
  logic [1:0] cfg_k = 0, k = 0;
  fx_t cfg_a2 = 0, cfg_ia2 = 0, lam_r = 0, lam_p = 0, r_t, rho_t;
  sigma_t sig = '0;
  int checks = 0, failures = 0;
  real a2r [K];
  real ia2r [K];

  dpg_pe1 #(.K(K), .B_VAL(B)) dut (.*);

  function automatic real q(input fx_t v); return real'(v) / 256.0; endfunction
  function automatic fx_t fx(input real v); return fx_t'($rtoi(v * 256.0)); endfunction

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real x, c, g, rho, r, tol;
    for (int i = 0; i < K; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_k = 2'(i);
      cfg_a2 = fx(0.2 + 0.5 * real'(i)); cfg_ia2 = fx(1.0 / (0.2 + 0.5 * real'(i)));
      a2r[i] = q(cfg_a2); ia2r[i] = q(cfg_ia2);
    end
    @(negedge clk); cfg_we = 0;
    for (int it = 0; it < 400; it++) begin
      k = 2'($urandom_range(K - 1));
      lam_r = fx_t'($urandom_range(6000));
      lam_p = fx_t'(int'($urandom_range(1600)) - 800);
      sig.inv_sigma = fx_t'($urandom_range(1024, 256));
      sig.sigma = fx(1.0 / q(sig.inv_sigma));
      #1;
      x = q(lam_r) * a2r[k];
      c = (x / (B * $ln(2.0)) > 1.0) ? $ln(x / (B * $ln(2.0))) / $ln(2.0) : 0.0;
      g = (c > 0.0) ? (B * ($pow(2.0, c) - 1.0) - x * c) : 0.0;
      rho = -(q(lam_p) + g * ia2r[k]) * q(sig.inv_sigma);
      r = rho * c;
      if (rho > 120.0 || rho < -120.0 || r > 120.0 || r < -120.0) continue;
      // g cancels two terms of size x*c*; a log2 error of 0.006 in c* moves
      // it by about 0.006*x, which 1/alpha^2 and 1/sigma then scale
      tol = 0.1 + 0.03 * (rho < 0 ? -rho : rho) + 0.012 * x * ia2r[k] * q(sig.inv_sigma);
      checks++;
      if (q(rho_t) - rho > tol || rho - q(rho_t) > tol) begin
        failures++; $display("rho mismatch: got %f exp %f", q(rho_t), rho);
      end
      tol = 0.1 + 0.03 * (r < 0 ? -r : r) + 0.012 * x * ia2r[k] * q(sig.inv_sigma) * c;
      checks++;
      if (q(r_t) - r > tol || r - q(r_t) > tol) begin
        failures++; $display("r mismatch: got %f exp %f", q(r_t), r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
