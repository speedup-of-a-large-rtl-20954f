// mac_pkg: widths, operand-mode encoding and token formats shared by the
// 72+32x32 multiply-accumulate pipeline.
//
// Number format. Operands are 32-bit fractions: a signed operand is Q1.31
// (value = int / 2^31), an unsigned one Q0.32 (value = int / 2^32). The
// accumulator is a 72-bit two's-complement number with its binary point
// above bit 64 (Q8.64); products are shifted into that position by the
// "2's complement and shift" stage (left by 2 for signed x signed, by 1 for
// signed x unsigned, not at all for unsigned x unsigned). The placement of
// the binary point is this design's choice.
//
// Accumulation is done on the low SW = 71 bits in carry-save form; bit 71 is
// rebuilt by the overflow logic from the previous sign, the sign of the
// addend and bit 70 of the new sum. The result is exact while it lies in the
// 71-bit range [-2^70, 2^70) (i.e. |value| < 64.0); leaving that range raises
// the overflow output for that result.
package mac_pkg;

  localparam int unsigned XW    = 32;       // operand width
  localparam int unsigned AW    = 72;       // accumulator width
  localparam int unsigned SW    = AW - 1;   // carry-save word width (71)
  localparam int unsigned NROWS = 33;       // partial-product rows: 31 + last row + MSB row
  localparam int unsigned NPP   = 31;       // rows from "Generate Partial Products"
  localparam int unsigned NCSA  = 8;        // pipelined CSA stages after PP generation

  // Operand signedness (the "Sign" input). 2'd3 is reserved and treated as
  // unsigned x unsigned.
  typedef enum logic [1:0] {
    SGN_SS = 2'd0,   // signed   x signed
    SGN_SU = 2'd1,   // signed X x unsigned Y
    SGN_UU = 2'd2    // unsigned x unsigned
  } sign_mode_e;

  // Control signals that travel with every operation.
  typedef struct packed {
    sign_mode_e mode;  // Sign
    logic       sub;   // Add/Sub: 1 = subtract the product
    logic       mpy;   // Mac/Mpy: 1 = multiply only (accumulator taken as 0)
  } ctrl_t;

  typedef logic [SW-1:0] word_t;

  // Operation entering the MAC (68 bits).
  typedef struct packed {
    logic [XW-1:0] x;
    logic [XW-1:0] y;
    ctrl_t         ctrl;
  } mac_in_t;

  // Product in carry-save form, leaving the multiplier.
  typedef struct packed {
    word_t pp1;
    word_t pp2;
    logic  msign;      // sign of X*Y (before Add/Sub)
    ctrl_t ctrl;
  } pp_tok_t;

  // New accumulator in carry-save form (A1 = sum word, A2 = carry word).
  typedef struct packed {
    word_t a1;
    word_t a2;
    logic  msign;
    ctrl_t ctrl;
  } acc_tok_t;

  // Low 71 bits of the new accumulator after the ripple-carry adder.
  typedef struct packed {
    word_t anew;
    logic  msign;
    ctrl_t ctrl;
  } sum_tok_t;

  // Final result.
  typedef struct packed {
    logic [AW-1:0] aout;
    logic          ov;
  } res_tok_t;

  // Number of words left by one 3:2 carry-save layer applied to n words.
  function automatic int unsigned csa_out_words(int unsigned n);
    return (n / 3) * 2 + n % 3;
  endfunction

  // Product shift that aligns a product to the Q8.64 accumulator.
  function automatic int unsigned product_shift(sign_mode_e m);
    case (m)
      SGN_SS:  return 2;
      SGN_SU:  return 1;
      default: return 0;
    endcase
  endfunction

endpackage
