// ncr_demux: NCR demultiplexer. Sends each incoming token to output A or B
// as selected by its sequencer (s1 = A, s2 = B) and reports the transfer on
// xfer so that the sequencer can advance.
//
// With INIT_DATA0 set the demultiplexer comes out of reset presenting a
// DATA0 (all-zero) token on output A; this is how the feedback demultiplexer
// of an NCR feedback loop starts the accumulator at zero. Until that token
// has been taken the input is not accepted, and its transfer does not step
// the sequencer (which must then be of Type 2, starting at B).
// Purely combinational steering apart from the one-bit reset-token flag.
module ncr_demux #(
  parameter int unsigned W          = 8,
  parameter bit          INIT_DATA0 = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s1,
  input  logic         s2,
  input  logic         in_valid,
  output logic         in_ready,  // Ko
  input  logic [W-1:0] in_data,
  output logic         a_valid,
  input  logic         a_ready,   // Ki1
  output logic [W-1:0] a_data,
  output logic         b_valid,
  input  logic         b_ready,   // Ki2
  output logic [W-1:0] b_data,
  output logic         xfer
);

  logic init_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 init_pend <= INIT_DATA0;
    else if (init_pend && a_ready) init_pend <= 1'b0;
  end

  always_comb begin
    a_valid  = init_pend || (in_valid && s1);
    a_data   = init_pend ? '0 : in_data;
    b_valid  = !init_pend && in_valid && s2;
    b_data   = in_data;
    in_ready = !init_pend && ((s1 && a_ready) || (s2 && b_ready));
    xfer     = in_valid && in_ready;
  end

endmodule
