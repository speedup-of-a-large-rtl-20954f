// twos_shift: "2's complement and shift partial products if necessary".
//
// Takes the product in carry-save form (two words) and produces three words
// whose sum, modulo 2^71, is the product moved to the accumulator's binary
// point and negated when the operation subtracts:
//   shift k = 2 (signed x signed), 1 (signed x unsigned), 0 (unsigned);
//   add:       w0<<k,  w1<<k,  0
//   subtract: ~(w0<<k), ~(w1<<k), 2      since -(a+b) = ~a + ~b + 2.
// The third word is reduced by the final CSA stage. The document names the
// function and its inputs (Sign, Add/Sub); the encoding is this design's.
// Combinational.
module twos_shift
  import mac_pkg::*;
(
  input  logic [1:0][SW-1:0] in_words,
  input  sign_mode_e         mode,
  input  logic               sub,
  output logic [2:0][SW-1:0] out_words
);

  word_t v0, v1;

  always_comb begin
    v0 = in_words[0] << product_shift(mode);
    v1 = in_words[1] << product_shift(mode);
    if (sub) begin
      out_words[0] = ~v0;
      out_words[1] = ~v1;
      out_words[2] = word_t'(2);
    end else begin
      out_words[0] = v0;
      out_words[1] = v1;
      out_words[2] = '0;
    end
  end

endmodule
