// Type-3 register of the DPG architecture: the running sum
// sum_{l<=k} rho_hat_{l,n} - 1 of one subcarrier.
//
// Written every clock while the engine runs (en = 1).  Its reset input is
// driven by k = 1 (first_k): in that clock the register reads -1 whatever it
// holds, which starts a new sum for the next middle-loop iteration (Step 1)
// without spending a clock.  Reading -1 at k = 1 rather than clearing the
// stored word is this design's way of giving the reset effect in the same
// clock in which the first user's rho_hat is added.
module dpg_reg_type3
  import dpg_pkg::*;
(
  input  logic clk,
  input  logic en,
  input  logic first_k,
  input  fx_t  d,
  output fx_t  q
);
  fx_t store;
  always_ff @(posedge clk) if (en) store <= d;
  assign q = first_k ? FX_MONE : store;
endmodule
