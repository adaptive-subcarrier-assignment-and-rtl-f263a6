// Type-2 register of the DPG architecture: K banks addressed by the register
// indicator k.
//
// Holds one word per user, either lambda_k^r or the projected pair
// (r_hat_{k,n}, rho_hat_{k,n}) of one subcarrier.  While the engine runs
// (en = 1) it is written every clock, into the bank k points at, and q
// presents the same bank, so the value read in a clock is the one written K
// clocks earlier.  The second read port (rd_k/rd_q) lets the output buffer
// unload the banks after convergence.  init clears every bank (Step 0 sets
// lambda^r = 0).  Writes happen at the rising clock edge.
module dpg_reg_type2 #(
  parameter int unsigned W = 16,
  parameter int unsigned K = 32
) (
  input  logic                 clk,
  input  logic                 init,
  input  logic                 en,
  input  logic [$clog2(K)-1:0] k,
  input  logic [W-1:0]         d,
  output logic [W-1:0]         q,
  input  logic [$clog2(K)-1:0] rd_k,
  output logic [W-1:0]         rd_q
);
  logic [W-1:0] bank [K];

  always_ff @(posedge clk) begin
    if (init) begin
      for (int i = 0; i < int'(K); i++) bank[i] <= '0;
    end else if (en) begin
      bank[k] <= d;
    end
  end

  assign q    = bank[k];
  assign rd_q = bank[rd_k];
endmodule
