// csa_layer: one layer of a Wallace tree. The first N-NPASS words are taken
// three at a time through 3:2 carry-save adders (full adders per bit), each
// triple giving a sum word and a carry word shifted left by one; words left
// over from the grouping, and the last NPASS words, pass through unchanged.
// The sum of the output words equals the sum of the input words modulo
// 2^W. Output order: sum/carry pairs, then leftovers, then passed words.
// Combinational, 2 full-adder levels deep in NCL terms.
module csa_layer #(
  parameter int unsigned N     = 3,
  parameter int unsigned NPASS = 0,
  parameter int unsigned W     = 8,
  localparam int unsigned NR   = N - NPASS,
  localparam int unsigned M    = (NR / 3) * 2 + NR % 3 + NPASS
) (
  input  logic [N-1:0][W-1:0] in_words,
  output logic [M-1:0][W-1:0] out_words
);

  localparam int unsigned NG = NR / 3;

  always_comb begin
    for (int g = 0; g < NG; g++) begin
      out_words[2*g]     = in_words[3*g] ^ in_words[3*g+1] ^ in_words[3*g+2];
      out_words[2*g + 1] = ((in_words[3*g]   & in_words[3*g+1]) |
                            (in_words[3*g]   & in_words[3*g+2]) |
                            (in_words[3*g+1] & in_words[3*g+2])) << 1;
    end
    for (int k = 0; k < int'(N) - 3 * int'(NG); k++)
      out_words[2*NG + k] = in_words[3*NG + k];
  end

endmodule
