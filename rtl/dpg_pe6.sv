// PE6 of the n-th PE array: algorithmic Step 5 of the DPG method.
//
// One adder that extends the running sum of the subcarrier's assignment
// variables by the current user's projected rho_hat_{k,n}:
//   acc_out = (sum_{l<k} rho_hat_{l,n} - 1) + rho_hat_{k,n}.
// The previous sum comes from the type-3 register R(dphi/dlambda_n^p), which
// reads -1 when k = 1; the result goes back to that register and to PE3.
// Combinational, saturating.
module dpg_pe6
  import dpg_pkg::*;
(
  input  fx_t acc_in,
  input  fx_t rho_hat,
  output fx_t acc_out
);
  always_comb acc_out = fadd(acc_in, rho_hat);
endmodule
