// Output buffer of the DPG architecture.
//
// Activated by the convergence pulse of CT_j, it unloads the solution
// (r_hat_{k,n}, rho_hat_{k,n}) of the last sigma towards the ordinal-
// optimization stage 1: one user per clock, all N subcarriers in parallel.
// It drives its own read index rd_k into the type-2 banks of the N PE arrays
// and registers what they return, so out_k/out_data/out_valid appear one
// clock after rd_k.  The document only says the buffer is activated to
// output the data; unloading one user per clock over K clocks is this
// design's choice.  A new act while unloading restarts from user 1.
// rst_n is an active-low synchronous reset.
module dpg_buffer
  import dpg_pkg::*;
#(
  parameter int unsigned K = 32,
  parameter int unsigned N = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 act,
  output logic [$clog2(K)-1:0] rd_k,
  input  rr_t                  bank_q   [N],
  output logic                 out_valid,
  output logic [$clog2(K)-1:0] out_k,
  output rr_t                  out_data [N],
  output logic                 busy
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      rd_k      <= '0;
      out_valid <= 1'b0;
      out_k     <= '0;
    end else begin
      out_valid <= busy;
      if (busy) begin
        out_k    <= rd_k;
        out_data <= bank_q;
      end
      if (act) begin
        busy <= 1'b1;
        rd_k <= '0;
      end else if (busy) begin
        if (rd_k == $clog2(K)'(K - 1)) busy <= 1'b0;
        else                           rd_k <= rd_k + 1'b1;
      end
    end
  end
endmodule
