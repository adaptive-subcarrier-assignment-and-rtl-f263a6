// Shared types, constants and fixed-point helpers of the dual projected
// gradient (DPG) engine.
//
// All data words are signed two's-complement numbers of DW bits with FW
// fraction bits (Q7.8 by default: range about +-128, step 1/256).  The
// 16-bit word follows the document's statement that 16 bits are enough for
// the DPG computation; the split into 7 integer and 8 fraction bits is this
// design's choice.  Every product is rounded to nearest (ties upwards) and
// saturated back to DW bits, so no result ever wraps.
//
// Embedded constants that are not plain fixed-point words (1/ln2, 1/(B ln2),
// 1/M, 1/(M^2+1)) are kept with CF = 16 fraction bits so that the rounding of
// the constant is well below one output LSB.
package dpg_pkg;

  localparam int unsigned DW = 16;  // data word width
  localparam int unsigned FW = 8;   // fraction bits of a data word
  localparam int unsigned CF = 16;  // fraction bits of an embedded constant

  typedef logic signed [DW-1:0] fx_t;

  localparam fx_t FX_ONE  = fx_t'(1 << FW);
  localparam fx_t FX_MONE = fx_t'(-(1 << FW));
  localparam fx_t FX_MAX  = fx_t'({1'b0, {(DW-1){1'b1}}});
  localparam fx_t FX_MIN  = fx_t'({1'b1, {(DW-1){1'b0}}});

  // sigma register contents: sigma and its reciprocal travel together so
  // that PE1 divides by sigma with a multiplier.
  typedef struct packed {
    fx_t sigma;
    fx_t inv_sigma;
  } sigma_t;

  // one projected pair (r_hat, rho_hat) of a (k,n) entry
  typedef struct packed {
    fx_t r;
    fx_t rho;
  } rr_t;

  // what a configuration write (cfg_we) loads
  typedef enum logic [2:0] {
    CFG_ALPHA = 3'd0,  // alpha_{k,n}^2 (d0) and 1/alpha_{k,n}^2 (d1) of PE1_n
    CFG_RATE  = 3'd1,  // R_k (d0) of PE4
    CFG_BETA  = 3'd2,  // step size beta (d0) of PE3_n and PE5
    CFG_ETA   = 3'd3,  // eta (d0) and 1/eta (d1) of PE7
    CFG_LOOPS = 3'd4   // tmax (d0) and jmax (d1) of the counters, unsigned
  } cfg_sel_t;

  // saturate a wide signed value to a data word
  function automatic fx_t sat(input logic signed [2*DW+CF-1:0] v);
    if (v > $signed({{(DW+CF+1){1'b0}}, FX_MAX[DW-2:0]})) return FX_MAX;
    if (v < -$signed({{(DW+CF+1){1'b0}}, FX_MAX[DW-2:0]}) - 1) return FX_MIN;
    return fx_t'(v);
  endfunction

  // a*b for two data words
  function automatic fx_t fmul(input fx_t a, input fx_t b);
    logic signed [2*DW+CF-1:0] p;
    p = (2*DW+CF)'(a) * (2*DW+CF)'(b) + (2*DW+CF)'(1 << (FW - 1));
    return sat(p >>> FW);
  endfunction

  // a*c for a data word and a constant with CF fraction bits
  function automatic fx_t cmul(input fx_t a, input logic signed [DW+CF-1:0] c);
    logic signed [2*DW+CF-1:0] p;
    p = (2*DW+CF)'(a) * (2*DW+CF)'(c) + (2*DW+CF)'(1 << (CF - 1));
    return sat(p >>> CF);
  endfunction

  // saturating a+b and a-b
  function automatic fx_t fadd(input fx_t a, input fx_t b);
    return sat((2*DW+CF)'(a) + (2*DW+CF)'(b));
  endfunction

  function automatic fx_t fsub(input fx_t a, input fx_t b);
    return sat((2*DW+CF)'(a) - (2*DW+CF)'(b));
  endfunction

endpackage
