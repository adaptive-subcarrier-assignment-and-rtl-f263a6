// Full-size end-to-end testbench of the DPG engine: the default K = 32
// users and N = 128 subcarriers, a total rate of 512 bits per OFDM symbol
// (4 bits per subcarrier on average) and tmax*jmax = 18000 as for K = 32,
// i.e. 576,000 iteration clocks.  With the step size used here (1/32) the
// dual iteration has not settled at this size, so agreement with the
// floating-point model and the convergence sums are reported, not failed;
// run length, buffer contents, feasibility and mechanism counts are checked.  It loads random Rayleigh-like channel constants
// (alpha^2 exponentially distributed, mean 1) and rate requests, runs the
// engine once and checks:
//   * busy lasts exactly K*tmax*jmax clocks and done pulses once;
//   * the buffer delivers K beats in user order whose pairs equal the last
//     (r_hat, rho_hat) each array produced;
//   * every pair is feasible (0 <= rho <= 1, 0 <= r <= M rho) and the run
//     has converged: sum_k rho_hat_{k,n} ~ 1 and sum_n r_hat_{k,n} ~ R_k;
//   * sigma ended at about eta^jmax;
//   * each mechanism happened: lambda^p writes at k = K, sigma writes at
//     t = tmax, type-3 restarts at k = 1, the c* = 0 clamp, and rows 0-3
//     of the projection table (rows 4-5 are counted and reported).
module tb_dpg_top_full;
  import dpg_pkg::*;
  localparam int K = 32, N = 128, M = 6;
  localparam int TMAX = 3000, JMAX = 6, ABPS = 4;
  localparam real BETA = 0.03125, ETA = 0.7;
  localparam real TOL_RHO = 0.15, TOL_R = 0.6;
  localparam bit  STRICT = 1'b0;
  localparam int KW = $clog2(K), NW = $clog2(N);

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, cfg_we = 0, start = 0, busy, done, out_valid;
  cfg_sel_t cfg_sel = CFG_ALPHA;
  logic [KW-1:0] cfg_k = 0, out_k;
  logic [NW-1:0] cfg_n = 0;
  fx_t cfg_d0 = 0, cfg_d1 = 0;
  rr_t out_data [N];

  dpg_top dut (.*);

  `include "tb_dpg_top_body.svh"
endmodule
