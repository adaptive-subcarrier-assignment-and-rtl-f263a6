// Base-2 logarithm of a positive fixed-point word, used by PE1 to evaluate
// the inverse derivative f'^-1(y) = log2(y / (B ln2)) of f(c) = B(2^c - 1).
//
// How it works: a leading-one detector finds the integer part of log2(u);
// the IB bits that follow the leading one address a ROM holding
// log2(1 + idx/2^IB) with FW fraction bits.  The ROM contents are computed at
// elaboration by a constant function that squares the mantissa repeatedly
// (each squaring yields one bit of the logarithm), so no table file is read.
// The document names a ROM in PE1 but not its contents or size; the
// leading-one plus ROM scheme and IB = 8 are this design's choices.
//
// Interface: u (Q7.8, treated as unsigned magnitude; u <= 0 gives 0),
// c = log2(u) (Q7.8, negative for u < 1).  Purely combinational.
module dpg_log2
  import dpg_pkg::*;
#(
  parameter int unsigned IB = 8  // ROM address bits (2^IB entries)
) (
  input  fx_t u,
  output fx_t c
);

  // log2(1 + idx/2^IB) * 2^FW, rounded to nearest
  function automatic int log2_entry(input int idx);
    longint y;       // mantissa, 1.0 = 2^30
    longint res;     // result with FW+4 fraction bits
    y   = (longint'(64'(1) << IB) + longint'(idx)) <<< (30 - IB);
    res = 0;
    for (int i = 1; i <= int'(FW) + 4; i++) begin
      y = (y * y) >>> 30;
      if (y >= (longint'(2) <<< 30)) begin
        y   = y >>> 1;
        res = res | (longint'(1) <<< (int'(FW) + 4 - i));
      end
    end
    return int'((res + 8) >>> 4);
  endfunction

  localparam int unsigned NE = 1 << IB;

  typedef logic [FW:0] rom_word_t;
  typedef rom_word_t rom_t [NE];

  function automatic rom_t build_rom();
    rom_t r;
    for (int i = 0; i < int'(NE); i++) r[i] = rom_word_t'(log2_entry(i));
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  logic [DW-2:0]   mag;
  int              lead;
  logic [DW+IB-1:0] shifted;
  logic [IB-1:0]   idx;

  always_comb begin
    mag  = u[DW-2:0];
    lead = 0;
    for (int i = 0; i < int'(DW) - 1; i++) if (mag[i]) lead = i;
    // bits right below the leading one, left-aligned into IB bits
    shifted = {{(IB+1){1'b0}}, mag} << IB;
    shifted = shifted >> lead;
    idx     = shifted[IB-1:0];
    if (u <= 0) c = '0;
    else        c = fx_t'((lead - int'(FW)) * (1 << FW)) + fx_t'(ROM[idx]);
  end

endmodule
