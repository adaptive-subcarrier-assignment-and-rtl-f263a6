// The three loop counters of the DPG architecture: CT_k, CT_t and CT_j.
//
// CT_k steps through the users 1..K once per clock (inner loop, Steps 2-7),
// CT_t steps 1..tmax once every K clocks (middle loop, Step 9) and CT_j
// counts the sigma values, one every K*tmax clocks (outer loop, Step 11).
// A run therefore lasts exactly K*tmax*jmax clocks.  tmax and jmax are
// constant registers written through cfg_we (16-bit unsigned, at least 1).
//
// Interface: start (one clock, while idle) sets k = t = j = 1 and raises run;
// run stays high for the K*tmax*jmax clocks of the run.  k is given 0-based
// (k_idx = k - 1) to address the type-2 register banks; k_first, k_last and
// t_last are the branch conditions k = 1, k = K and t = tmax.  conv pulses in
// the clock after the last one (j reached jmax), which is when the outputs
// of that clock have been written and the buffer can be activated.
// rst_n is an active-low synchronous reset.
module dpg_counters #(
  parameter int unsigned K = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [15:0]          cfg_tmax,
  input  logic [15:0]          cfg_jmax,
  input  logic                 start,
  output logic                 run,
  output logic [$clog2(K)-1:0] k_idx,
  output logic [15:0]          t,
  output logic [15:0]          j,
  output logic                 k_first,
  output logic                 k_last,
  output logic                 t_last,
  output logic                 conv
);
  logic [15:0] tmax_q, jmax_q;

  always_ff @(posedge clk) if (cfg_we) begin
    tmax_q <= cfg_tmax;
    jmax_q <= cfg_jmax;
  end

  assign k_first = (k_idx == '0);
  assign k_last  = (k_idx == $clog2(K)'(K - 1));
  assign t_last  = (t >= tmax_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run   <= 1'b0;
      conv  <= 1'b0;
      k_idx <= '0;
      t     <= 16'd1;
      j     <= 16'd1;
    end else begin
      conv <= 1'b0;
      if (!run) begin
        if (start) begin
          run   <= 1'b1;
          k_idx <= '0;
          t     <= 16'd1;
          j     <= 16'd1;
        end
      end else if (!k_last) begin
        k_idx <= k_idx + 1'b1;
      end else begin
        k_idx <= '0;
        if (!t_last) begin
          t <= t + 16'd1;
        end else begin
          t <= 16'd1;
          if (j >= jmax_q) begin
            run  <= 1'b0;
            conv <= 1'b1;
          end else begin
            j <= j + 16'd1;
          end
        end
      end
    end
  end
endmodule
