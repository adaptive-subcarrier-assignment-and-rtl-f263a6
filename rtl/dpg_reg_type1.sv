// Type-1 register of the DPG architecture: a word with write enable.
//
// Holds a value that changes only at a loop boundary: lambda_n^p (enable
// k = K) or sigma (enables k = K and t = tmax).  The write enables are NE
// separate inputs that must all be high, matching the one or two enable
// inputs drawn for these registers; data is taken at the rising clock edge.
// init loads the Step 0 value init_val (0 for lambda_n^p, 1 for sigma) and
// has priority over a write.
module dpg_reg_type1 #(
  parameter int unsigned W  = 16,
  parameter int unsigned NE = 1
) (
  input  logic          clk,
  input  logic          init,
  input  logic [W-1:0]  init_val,
  input  logic [NE-1:0] we,
  input  logic [W-1:0]  d,
  output logic [W-1:0]  q
);
  always_ff @(posedge clk) begin
    if (init)     q <= init_val;
    else if (&we) q <= d;
  end
endmodule
