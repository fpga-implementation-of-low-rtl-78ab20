// f(x) look-up table of the log-domain belief propagation decoder,
// f(x) = ln((1 + e^-|x|) / (1 - e^-|x|)).
//
// A combinational ROM of LUT_DEPTH (170) 7-bit words, filled at elaboration
// from ldpc_pkg::f_entry. Input and output carry 5 fractional bits. The input
// is an unsigned magnitude of IN_W bits (9 bits in the check node unit, 8 in
// the variable node unit); any input at or beyond the end of the table reads
// 0, the value f has fallen below there. f(0) is infinite and reads 127, the
// largest 7-bit magnitude.
//
// The table size and widths follow the source design; the rounding to
// nearest and the saturation at 127 are this design's choice.
module ldpc_lut
  import ldpc_pkg::*;
#(
  parameter int unsigned IN_W = 9
) (
  input  logic [IN_W-1:0]  x,
  output logic [MAG_W-1:0] y
);

  typedef logic [MAG_W-1:0] rom_t [LUT_DEPTH];

  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned i = 0; i < LUT_DEPTH; i++) r[i] = f_entry(i);
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_comb begin
    if (32'(x) < LUT_DEPTH) y = ROM[32'(x)];
    else                    y = '0;
  end

endmodule
