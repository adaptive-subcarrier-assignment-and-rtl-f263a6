// PE3 of the n-th PE array: algorithmic Step 8 of the DPG method.
//
// Updates the subcarrier multiplier by one projected-gradient step,
//   lambda_n^p(t+1) = lambda_n^p(t) + beta * (sum_k rho_hat_{k,n} - 1),
// with one multiplier and one adder.  The step size beta is an embedded
// constant register, written through cfg_we/cfg_beta as the document places
// the constants inside the PE that uses them.  The result is written into
// R(lambda_n^p) only in the clock where k = K (the register's write enable);
// PE3 itself is combinational apart from the beta register.
module dpg_pe3
  import dpg_pkg::*;
(
  input  logic clk,
  input  logic cfg_we,
  input  fx_t  cfg_beta,
  input  fx_t  grad,      // sum_{l<=K} rho_hat_{l,n} - 1, from PE6
  input  fx_t  lam_p,     // lambda_n^p(t), from R(lambda_n^p)
  output fx_t  lam_p_nx   // lambda_n^p(t+1), to R(lambda_n^p)
);
  fx_t beta_q;
  always_ff @(posedge clk) if (cfg_we) beta_q <= cfg_beta;
  always_comb lam_p_nx = fadd(lam_p, fmul(beta_q, grad));
endmodule
