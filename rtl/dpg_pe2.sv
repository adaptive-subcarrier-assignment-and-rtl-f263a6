// PE2 of the n-th PE array: algorithmic Step 3 of the DPG method.
//
// Projects the unconstrained pair (r~, rho~) onto the feasible set
// {0 <= rho <= 1, 0 <= r <= M rho} by the case table of the document, tested
// in this order:
//   rho~ < 0                                  -> (0, 0)
//   rho~ >= 1, r~ >= M                        -> (M, 1)
//   rho~ >= 1, r~ <  M                        -> (r~, 1)
//   0 <= r~ <= M rho~                         -> (r~, rho~)   (inside)
//   r~ >= M + 1/M - rho~/M                    -> (M, 1)       (beyond the corner)
//   otherwise                                 -> foot of the perpendicular on
//                                                r = M rho:  s = (M r~ + rho~)/(M^2+1),
//                                                (M s, s)
// M is the largest number of bits per subcarrier (6 for 64-QAM).  The
// constants 1/M and 1/(M^2+1) are embedded with 16 fraction bits.
// Combinational.
module dpg_pe2
  import dpg_pkg::*;
#(
  parameter int unsigned M = 6
) (
  input  fx_t r_t,
  input  fx_t rho_t,
  output rr_t hat
);

  typedef logic signed [DW+CF-1:0] cst_t;
  localparam cst_t C_M    = cst_t'(M) <<< CF;
  localparam cst_t C_IM   = cst_t'($rtoi(real'(1 << CF) / real'(M) + 0.5));
  localparam cst_t C_IM21 = cst_t'($rtoi(real'(1 << CF) / real'(M * M + 1) + 0.5));
  localparam fx_t  M_FX   = fx_t'(M << FW);
  localparam fx_t  IM_FX  = fx_t'($rtoi(real'(1 << FW) / real'(M) + 0.5));

  fx_t m_rho, corner, s;

  always_comb begin
    m_rho  = cmul(rho_t, C_M);
    corner = fsub(fadd(M_FX, IM_FX), cmul(rho_t, C_IM));
    s      = cmul(fadd(cmul(r_t, C_M), rho_t), C_IM21);
    if (rho_t < 0)                          hat = '{r: '0,   rho: '0};
    else if (rho_t >= FX_ONE && r_t >= M_FX) hat = '{r: M_FX, rho: FX_ONE};
    else if (rho_t >= FX_ONE)               hat = '{r: r_t,  rho: FX_ONE};
    else if (r_t >= 0 && r_t <= m_rho)      hat = '{r: r_t,  rho: rho_t};
    else if (r_t >= corner)                 hat = '{r: M_FX, rho: FX_ONE};
    else                                    hat = '{r: cmul(s, C_M), rho: s};
  end

endmodule
