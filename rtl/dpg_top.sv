// Dual projected gradient (DPG) engine for the relaxed subcarrier-assignment
// and bit-allocation problem of a K-user, N-subcarrier OFDM downlink.
//
// The engine maximises the dual of the convexified continuous problem by
// projected gradient ascent on the multipliers lambda_k^r (one per user's
// rate request) and lambda_n^p (one per subcarrier's "one owner" rule), for a
// decreasing sequence of convexifying weights sigma.  N identical PE arrays,
// one per subcarrier, work in parallel; the users are taken one per clock by
// CT_k.  In one clock the combinational path PE1 -> PE2 -> PE4 -> PE5 gives
// user k's new lambda_k^r, while each array adds rho_hat_{k,n} to its running
// sum (PE6) and, at k = K, updates lambda_n^p (PE3).  After tmax sweeps over
// the users PE7 shrinks sigma by eta; after jmax values of sigma CT_j signals
// convergence and the buffer unloads (r_hat, rho_hat) for every (k, n).
// One run takes K*tmax*jmax clocks plus K clocks of unloading.
//
// Interface
//   cfg_*   : constant loading while idle; cfg_sel picks what is written
//             (dpg_pkg::cfg_sel_t), cfg_k/cfg_n address alpha and R_k,
//             cfg_d0/cfg_d1 carry the values (Q7.8; tmax/jmax unsigned).
//   start   : one-clock pulse; Step 0 initialisation (lambda = 0, sigma = 1)
//             happens in the same clock.
//   busy    : high while iterating.  done pulses once at convergence.
//   out_*   : K beats, one per user, each carrying all N pairs.
// Synchronous active-low reset rst_n for control state; data registers are
// initialised by start.
//
// Follows the document: the PE split and its steps, the three register
// types, the counters and their branch conditions, one inner iteration per
// clock, lambda(0) = 0 and sigma(0) = 1.  This design's choices: the Q7.8
// number format, carrying 1/sigma beside sigma, the configuration port and
// the one-user-per-clock buffer.
module dpg_top
  import dpg_pkg::*;
#(
  parameter int unsigned K     = 32,   // users
  parameter int unsigned N     = 128,  // subcarriers
  parameter int unsigned M     = 6,    // most bits per subcarrier (64-QAM)
  parameter real         B_VAL = 1.0   // B of f(c) = B(2^c - 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  cfg_sel_t             cfg_sel,
  input  logic [$clog2(K)-1:0] cfg_k,
  input  logic [$clog2(N)-1:0] cfg_n,
  input  fx_t                  cfg_d0,
  input  fx_t                  cfg_d1,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic                 out_valid,
  output logic [$clog2(K)-1:0] out_k,
  output rr_t                  out_data [N]
);
  logic                 run, init, k_first, k_last, t_last, conv;
  logic [$clog2(K)-1:0] k_idx, rd_k;
  logic [15:0]          t, j;
  fx_t                  lam_r, lam_r_nx, grad_r;
  fx_t                  r_hat  [N];
  rr_t                  hat    [N];
  rr_t                  bank_q [N];
  sigma_t               sig, sig_nx;

  assign init = start & ~run;
  assign busy = run;
  assign done = conv;

  dpg_counters #(.K(K)) u_ct (
    .clk, .rst_n,
    .cfg_we(cfg_we && cfg_sel == CFG_LOOPS),
    .cfg_tmax(cfg_d0), .cfg_jmax(cfg_d1),
    .start, .run, .k_idx, .t, .j, .k_first, .k_last, .t_last, .conv);

  for (genvar n = 0; n < int'(N); n++) begin : g_arr
    dpg_pe_array #(.K(K), .M(M), .B_VAL(B_VAL)) u_arr (
      .clk, .init, .run, .k_idx, .k_first, .k_last, .lam_r, .sig,
      .cfg_alpha_we(cfg_we && cfg_sel == CFG_ALPHA && cfg_n == $clog2(N)'(n)),
      .cfg_beta_we (cfg_we && cfg_sel == CFG_BETA),
      .cfg_k, .cfg_d0, .cfg_d1,
      .r_hat(r_hat[n]), .hat(hat[n]), .rd_k, .rd_q(bank_q[n]));
  end

  dpg_pe4 #(.K(K), .N(N)) u_pe4 (
    .clk, .cfg_we(cfg_we && cfg_sel == CFG_RATE), .cfg_k, .cfg_rate(cfg_d0),
    .k(k_idx), .r_hat, .grad(grad_r));

  dpg_pe5 u_pe5 (
    .clk, .cfg_we(cfg_we && cfg_sel == CFG_BETA), .cfg_beta(cfg_d0),
    .grad(grad_r), .lam_r, .lam_r_nx);

  dpg_reg_type2 #(.W(DW), .K(K)) u_r_lamr (
    .clk, .init, .en(run), .k(k_idx), .d(lam_r_nx), .q(lam_r),
    .rd_k('0), .rd_q());

  dpg_pe7 u_pe7 (
    .clk, .cfg_we(cfg_we && cfg_sel == CFG_ETA), .cfg_eta(cfg_d0),
    .cfg_inv_eta(cfg_d1), .sig, .sig_nx);

  dpg_reg_type1 #(.W(2*DW), .NE(3)) u_r_sigma (
    .clk, .init, .init_val({FX_ONE, FX_ONE}), .we({run, k_last, t_last}),
    .d(sig_nx), .q(sig));

  dpg_buffer #(.K(K), .N(N)) u_buf (
    .clk, .rst_n, .act(conv), .rd_k, .bank_q, .out_valid, .out_k, .out_data,
    .busy());

  // configuration is only accepted while idle
  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> !run);
endmodule
