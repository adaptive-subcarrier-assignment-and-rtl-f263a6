// PE4 (single): algorithmic Step 4 of the DPG method.
//
// Forms the rate-constraint gradient of the user k addressed this clock,
//   dphi/dlambda_k^r = R_k - sum_{n=1..N} r_hat_{k,n},
// from the N projected rates that the PE arrays deliver in the same clock.
// The sum is a balanced adder tree (log2 N levels plus the subtraction of
// R_k, as the document counts it) carried out at full width and saturated
// once at the end.  The requested rates R_k (bits per OFDM symbol, in the
// same Q7.8 format) sit in embedded registers written through the cfg_* port
// and are picked by the register indicator k.  Combinational apart from the
// R_k registers.
module dpg_pe4
  import dpg_pkg::*;
#(
  parameter int unsigned K = 32,
  parameter int unsigned N = 128
) (
  input  logic                 clk,
  input  logic                 cfg_we,
  input  logic [$clog2(K)-1:0] cfg_k,
  input  fx_t                  cfg_rate,
  input  logic [$clog2(K)-1:0] k,
  input  fx_t                  r_hat [N],
  output fx_t                  grad
);
  localparam int unsigned SW = DW + $clog2(N) + 1;
  typedef logic signed [SW-1:0] sum_t;

  fx_t rate_q [K];
  always_ff @(posedge clk) if (cfg_we) rate_q[cfg_k] <= cfg_rate;

  // adder tree over a power-of-two padded vector
  localparam int unsigned NP = 1 << $clog2(N);
  sum_t lvl [2*NP-1];

  always_comb begin
    for (int i = 0; i < int'(NP); i++)
      lvl[NP-1+i] = (i < int'(N)) ? sum_t'(r_hat[i]) : '0;
    for (int i = int'(NP) - 2; i >= 0; i--)
      lvl[i] = lvl[2*i+1] + lvl[2*i+2];
    grad = sat((2*DW+CF)'(rate_q[k]) - (2*DW+CF)'(lvl[0]));
  end
endmodule
