// PE1 of the n-th PE array: algorithmic Step 2 of the DPG method.
//
// For the user k selected by the register indicator it solves the 2x2
// first-order conditions of the unconstrained subproblem in closed form, for
// the power function f(c) = B(2^c - 1):
//   x       = lambda_k^r * alpha_{k,n}^2
//   c*      = f'^-1(x) = log2(x / (B ln2)), clamped at 0 from below
//   g       = f(c*) - x c*   with f(c*) = x/ln2 - B   (g = 0 when c* = 0)
//   rho~    = -(lambda_n^p + g / alpha_{k,n}^2) / sigma
//   r~      = rho~ * c*
// The division by sigma is a multiplication by 1/sigma, which travels with
// sigma in R(sigma).  Following the document, PE1 holds the channel
// constants alpha_{k,n}^2 and 1/alpha_{k,n}^2 for all K users in embedded
// registers (written through the cfg_* port) and picks them with k.
//
// The sign of lambda_n^p follows the first-order condition (12); the closed
// form printed as (14) carries the opposite sign, which would make the
// projected-gradient step on lambda^p move away from the optimum.  Clamping c*
// at 0 (c* < 0 means no bits are worth sending at this price) is this
// design's choice; it keeps r~ >= 0 whenever rho~ >= 0, the region the
// projection (15) is written for.
//
// Timing: the datapath is combinational (seven multipliers, a log2 ROM);
// only the embedded constant registers are clocked.
module dpg_pe1
  import dpg_pkg::*;
#(
  parameter int unsigned K     = 32,   // users
  parameter real         B_VAL = 1.0   // B of f(c) = B(2^c - 1)
) (
  input  logic                 clk,
  input  logic                 cfg_we,
  input  logic [$clog2(K)-1:0] cfg_k,
  input  fx_t                  cfg_a2,
  input  fx_t                  cfg_ia2,
  input  logic [$clog2(K)-1:0] k,        // register indicator (0-based)
  input  fx_t                  lam_r,    // lambda_k^r(t)
  input  fx_t                  lam_p,    // lambda_n^p(t)
  input  sigma_t               sig,      // sigma(j) and 1/sigma(j)
  output fx_t                  r_t,      // r~_{k,n}
  output fx_t                  rho_t     // rho~_{k,n}
);

  typedef logic signed [DW+CF-1:0] cst_t;
  localparam real  LN2    = 0.6931471805599453;
  localparam cst_t C_IBL2 = cst_t'($rtoi(real'(1 << CF) / (B_VAL * LN2) + 0.5));
  localparam cst_t C_IL2  = cst_t'($rtoi(real'(1 << CF) / LN2 + 0.5));
  localparam fx_t  B_FX   = fx_t'($rtoi(B_VAL * real'(1 << FW) + 0.5));

  fx_t a2_q  [K];
  fx_t ia2_q [K];

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      a2_q[cfg_k]  <= cfg_a2;
      ia2_q[cfg_k] <= cfg_ia2;
    end
  end

  fx_t x, u, cstar, lg, g, num;

  dpg_log2 u_log2 (.u(u), .c(lg));

  always_comb begin
    x     = fmul(lam_r, a2_q[k]);
    u     = cmul(x, C_IBL2);
    cstar = (u > FX_ONE) ? lg : '0;
    if (cstar == '0) g = '0;
    else             g = fsub(fsub(cmul(x, C_IL2), B_FX), fmul(x, cstar));
    num   = fadd(lam_p, fmul(g, ia2_q[k]));
    rho_t = fmul(fsub('0, num), sig.inv_sigma);
    r_t   = fmul(rho_t, cstar);
  end

endmodule
