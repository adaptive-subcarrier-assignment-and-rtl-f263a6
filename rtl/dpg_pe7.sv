// PE7 (single): algorithmic Step 10 of the DPG method.
//
// Shrinks the convexifying weight, sigma(j+1) = eta * sigma(j).  The design
// keeps 1/sigma next to sigma (PE1 multiplies by it instead of dividing), so
// PE7 also forms 1/sigma(j+1) = (1/eta) * (1/sigma(j)); eta and 1/eta are
// embedded constant registers written through the cfg_* port.  Carrying
// 1/sigma and the second multiplier are this design's choices; the document
// lists a single multiplier.  The result is written into R(sigma) only when
// k = K and t = tmax.  Combinational apart from the constant registers.
module dpg_pe7
  import dpg_pkg::*;
(
  input  logic   clk,
  input  logic   cfg_we,
  input  fx_t    cfg_eta,
  input  fx_t    cfg_inv_eta,
  input  sigma_t sig,
  output sigma_t sig_nx
);
  fx_t eta_q, inv_eta_q;
  always_ff @(posedge clk) if (cfg_we) begin
    eta_q     <= cfg_eta;
    inv_eta_q <= cfg_inv_eta;
  end
  always_comb begin
    sig_nx.sigma     = fmul(sig.sigma, eta_q);
    sig_nx.inv_sigma = fmul(sig.inv_sigma, inv_eta_q);
  end
endmodule
