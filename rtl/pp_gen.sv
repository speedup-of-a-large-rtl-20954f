// pp_gen: partial-product generation and multiply sign (first stage of the
// multiplier; "Generate Partial Products", "Generate Last Row and MSBs of
// Partial Products" and "Calculate Multiply Sign" in the block diagram).
//
// X is extended to the 71-bit word width, sign-extended when X is signed
// (signed x signed, signed x unsigned) and zero-extended otherwise. Rows 0
// to 30 are X_ext << j when bit j of Y is set. Row 31 (the last row) holds
// bit 31 of Y: X_ext << 31 when Y is unsigned, and its two's-complement
// negation when Y is signed, split into ~X_ext << 31 in row 31 and a +2^31
// correction in row 32 (the MSB row). The 33 rows sum, modulo 2^71, to the
// integer product X*Y. msign is the sign of X*Y taken from the operand
// signs (it is 1 for a negative operand times zero, which the overflow
// logic tolerates). The document names these functions; the row encoding
// is this design's choice. Combinational.
module pp_gen
  import mac_pkg::*;
(
  input  logic [XW-1:0]              x,
  input  logic [XW-1:0]              y,
  input  sign_mode_e                 mode,
  output logic [NROWS-1:0][SW-1:0]   rows,
  output logic                       msign
);

  logic  x_signed, y_signed;
  word_t x_ext;

  always_comb begin
    x_signed = (mode == SGN_SS) || (mode == SGN_SU);
    y_signed = (mode == SGN_SS);
    x_ext    = x_signed ? word_t'(signed'(x)) : word_t'(x);
    for (int j = 0; j < NPP; j++)
      rows[j] = y[j] ? (x_ext << j) : '0;
    if (y_signed) begin
      rows[NPP]     = y[XW-1] ? (~x_ext << (XW-1)) : '0;
      rows[NPP + 1] = y[XW-1] ? (word_t'(1) << (XW-1)) : '0;
    end else begin
      rows[NPP]     = y[XW-1] ? (x_ext << (XW-1)) : '0;
      rows[NPP + 1] = '0;
    end
    msign = (x_signed && x[XW-1]) ^ (y_signed && y[XW-1]);
  end

endmodule
