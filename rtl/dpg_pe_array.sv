// The n-th PE array of the DPG architecture (one column of the engine).
//
// It owns everything that belongs to subcarrier n: PE1_n (Step 2, with the
// alpha_{k,n}^2 and 1/alpha_{k,n}^2 registers), PE2_n (Step 3, projection),
// PE6_n (Step 5, running sum of rho_hat), PE3_n (Step 8, lambda_n^p update),
// the type-1 register R(lambda_n^p), the type-3 register R(dphi/dlambda_n^p)
// and the type-2 bank R((r_hat,rho_hat)_{1..K,n}).  Per clock it handles the
// user k given by CT_k: lambda_k^r and sigma come in from the shared
// registers, r_hat_{k,n} goes out to PE4, and (r_hat, rho_hat) is stored in
// bank k.  In the clock where k = K, PE3_n's result is written into
// R(lambda_n^p) so the next middle-loop iteration sees the new multiplier.
//
// Interface: init (Step 0) clears lambda_n^p; run enables the always-written
// registers; cfg_alpha_we writes the channel constants of user cfg_k;
// cfg_beta_we writes beta.  rd_k/rd_q is the buffer's read port.
// All registers load at the rising clock edge; the datapath between them is
// combinational, one inner iteration per clock as in the document.
module dpg_pe_array
  import dpg_pkg::*;
#(
  parameter int unsigned K     = 32,
  parameter int unsigned M     = 6,
  parameter real         B_VAL = 1.0
) (
  input  logic                 clk,
  input  logic                 init,
  input  logic                 run,
  input  logic [$clog2(K)-1:0] k_idx,
  input  logic                 k_first,
  input  logic                 k_last,
  input  fx_t                  lam_r,
  input  sigma_t               sig,
  input  logic                 cfg_alpha_we,
  input  logic                 cfg_beta_we,
  input  logic [$clog2(K)-1:0] cfg_k,
  input  fx_t                  cfg_d0,
  input  fx_t                  cfg_d1,
  output fx_t                  r_hat,
  output rr_t                  hat,
  input  logic [$clog2(K)-1:0] rd_k,
  output rr_t                  rd_q
);
  fx_t lam_p, lam_p_nx, r_t, rho_t, acc_q, acc_d;
  rr_t bank_q;

  dpg_reg_type1 #(.W(DW), .NE(2)) u_r_lamp (
    .clk, .init, .init_val('0), .we({run, k_last}), .d(lam_p_nx), .q(lam_p));

  dpg_pe1 #(.K(K), .B_VAL(B_VAL)) u_pe1 (
    .clk, .cfg_we(cfg_alpha_we), .cfg_k, .cfg_a2(cfg_d0), .cfg_ia2(cfg_d1),
    .k(k_idx), .lam_r, .lam_p, .sig, .r_t, .rho_t);

  dpg_pe2 #(.M(M)) u_pe2 (.r_t, .rho_t, .hat);

  dpg_reg_type3 u_r_grad (.clk, .en(run), .first_k(k_first), .d(acc_d), .q(acc_q));

  dpg_pe6 u_pe6 (.acc_in(acc_q), .rho_hat(hat.rho), .acc_out(acc_d));

  dpg_pe3 u_pe3 (.clk, .cfg_we(cfg_beta_we), .cfg_beta(cfg_d0), .grad(acc_d),
                 .lam_p, .lam_p_nx);

  dpg_reg_type2 #(.W(2*DW), .K(K)) u_r_hat (
    .clk, .init(1'b0), .en(run), .k(k_idx), .d(hat), .q(bank_q), .rd_k, .rd_q);

  assign r_hat = hat.r;
endmodule
