// PE5 (single): algorithmic Step 6 of the DPG method.
//
// Updates the rate multiplier of the user k addressed this clock,
//   lambda_k^r(t+1) = lambda_k^r(t) + beta * dphi/dlambda_k^r,
// with one multiplier and one adder.  beta is an embedded constant register
// written through cfg_we/cfg_beta.  The result goes to bank k of the type-2
// register R(lambda_1^r..lambda_K^r) at the end of the same clock.
// Combinational apart from the beta register.
module dpg_pe5
  import dpg_pkg::*;
(
  input  logic clk,
  input  logic cfg_we,
  input  fx_t  cfg_beta,
  input  fx_t  grad,      // dphi/dlambda_k^r, from PE4
  input  fx_t  lam_r,     // lambda_k^r(t)
  output fx_t  lam_r_nx   // lambda_k^r(t+1)
);
  fx_t beta_q;
  always_ff @(posedge clk) if (cfg_we) beta_q <= cfg_beta;
  always_comb lam_r_nx = fadd(lam_r, fmul(beta_q, grad));
endmodule
