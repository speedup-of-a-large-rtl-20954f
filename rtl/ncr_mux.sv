// ncr_mux: NCR multiplexer. Merges the outputs of the original (A) and the
// duplicate (B) circuit back into one token stream, taking from the side
// its sequencer selects (s1 = A, s2 = B) so that tokens leave in the order
// they were demultiplexed. xfer reports a completed transfer to step the
// sequencer. Combinational.
module ncr_mux #(
  parameter int unsigned W = 8
) (
  input  logic         s1,
  input  logic         s2,
  input  logic         a_valid,
  output logic         a_ready,
  input  logic [W-1:0] a_data,
  input  logic         b_valid,
  output logic         b_ready,
  input  logic [W-1:0] b_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic         xfer
);

  always_comb begin
    out_valid = (s1 && a_valid) || (s2 && b_valid);
    out_data  = s2 ? b_data : a_data;
    a_ready   = s1 && out_ready;
    b_ready   = s2 && out_ready;
    xfer      = out_valid && out_ready;
  end

endmodule
