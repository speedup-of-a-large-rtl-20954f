// ncr_sequencer: steering state for NULL Cycle Reduction.
//
// NCR duplicates a circuit and sends alternate DATA wavefronts to the
// original (output A, select S1) and the duplicate (output B, select S2).
// The NCL sequencer steps S1S2 through 10,00,01,00 (Type 1); the Type 2
// variant starts one step ahead (00,01,00,10) and pairs with a
// demultiplexer whose A output is reset to DATA0. In this token model the
// NULL steps (00) are implicit, so the sequencer is a toggle: s1 selects A,
// s2 selects B, and each completed transfer (adv) moves to the other side.
// Type 1 resets to A; Type 2 resets to B, because the DATA0 token already
// reset into output A counts as the first transfer.
//
// The document gives one sequencer per bit; all bits of a word move
// together here, so one sequencer serves a whole word.
module ncr_sequencer #(
  parameter bit TYPE2 = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic adv,    // a DATA token passed through the steered port
  output logic s1,     // route to / take from A (original)
  output logic s2      // route to / take from B (duplicate)
);

  logic sel_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sel_b <= TYPE2;
    else if (adv) sel_b <= ~sel_b;
  end

  assign s1 = ~sel_b;
  assign s2 = sel_b;

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) s1 != s2);

endmodule
