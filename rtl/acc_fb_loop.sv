// acc_fb_loop: the NULL-Cycle-Reduced accumulate feedback loop.
//
// The accumulator circulates in carry-save form (A1, A2) and is never
// resolved inside the loop, so the loop holds only two CSAs; the carry
// propagation is done afterwards by the pipelined ripple-carry adder.
//
//   feed-forward demux (Type 1 sequencer)  PP tokens alternately to copy A
//                                          and copy B of acc_fb_copy
//   feedback demux (Type 2 sequencer,      the previous A1/A2 alternately to
//   output A reset to DATA0)               A and B; the reset token starts
//                                          the accumulator at zero
//   output mux (Type 1 sequencer)          merges the copies in order
//   output register                        the non-functional stage; its
//                                          A1/A2 go both back to the
//                                          feedback demux and out to the
//                                          adder (two-input completion: the
//                                          token leaves when both take it)
//
// Operation i is computed by copy A for even i and copy B for odd i; the
// result of i reaches the other copy through the feedback demux.
// Each output token is the accumulator after one operation. The structure
// follows the document; the one-sequencer-per-word simplification is this
// design's (the document has one sequencer per bit).
module acc_fb_loop
  import mac_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,   // Ko to the multiplier
  input  pp_tok_t  in_data,
  output logic     out_valid,
  input  logic     out_ready,  // Ki from the adder
  output acc_tok_t out_data
);

  localparam int unsigned FBW = 2 * SW;

  logic ffs1, ffs2, ff_xfer, fbs1, fbs2, fb_xfer, os1, os2, o_xfer;
  logic ffa_v, ffa_r, ffb_v, ffb_r;
  pp_tok_t ffa_d, ffb_d;
  logic fbi_v, fbi_r, fba_v, fba_r, fbb_v, fbb_r;
  logic [FBW-1:0] fba_d, fbb_d;
  logic ca_v, ca_r, cb_v, cb_r, m_v, m_r, q_v, q_r;
  acc_tok_t ca_d, cb_d, m_d, q_d;

  // ---- feed-forward demultiplexer ----
  ncr_sequencer #(.TYPE2(1'b0)) u_seq_ff (.clk, .rst_n, .adv(ff_xfer), .s1(ffs1), .s2(ffs2));

  ncr_demux #(.W($bits(pp_tok_t)), .INIT_DATA0(1'b0)) u_demux_ff (
    .clk, .rst_n, .s1(ffs1), .s2(ffs2),
    .in_valid, .in_ready, .in_data,
    .a_valid(ffa_v), .a_ready(ffa_r), .a_data(ffa_d),
    .b_valid(ffb_v), .b_ready(ffb_r), .b_data(ffb_d),
    .xfer(ff_xfer));

  // ---- feedback demultiplexer, output A reset to DATA0 ----
  ncr_sequencer #(.TYPE2(1'b1)) u_seq_fb (.clk, .rst_n, .adv(fb_xfer), .s1(fbs1), .s2(fbs2));

  ncr_demux #(.W(FBW), .INIT_DATA0(1'b1)) u_demux_fb (
    .clk, .rst_n, .s1(fbs1), .s2(fbs2),
    .in_valid(fbi_v), .in_ready(fbi_r), .in_data({q_d.a2, q_d.a1}),
    .a_valid(fba_v), .a_ready(fba_r), .a_data(fba_d),
    .b_valid(fbb_v), .b_ready(fbb_r), .b_data(fbb_d),
    .xfer(fb_xfer));

  // ---- original and duplicate circuitry ----
  acc_fb_copy u_copy_a (
    .clk, .rst_n,
    .ff_valid(ffa_v), .ff_ready(ffa_r), .ff_data(ffa_d),
    .fb_valid(fba_v), .fb_ready(fba_r), .fb_data(fba_d),
    .out_valid(ca_v), .out_ready(ca_r), .out_data(ca_d));

  acc_fb_copy u_copy_b (
    .clk, .rst_n,
    .ff_valid(ffb_v), .ff_ready(ffb_r), .ff_data(ffb_d),
    .fb_valid(fbb_v), .fb_ready(fbb_r), .fb_data(fbb_d),
    .out_valid(cb_v), .out_ready(cb_r), .out_data(cb_d));

  // ---- output multiplexer and non-functional register ----
  ncr_sequencer #(.TYPE2(1'b0)) u_seq_out (.clk, .rst_n, .adv(o_xfer), .s1(os1), .s2(os2));

  ncr_mux #(.W($bits(acc_tok_t))) u_mux (
    .s1(os1), .s2(os2),
    .a_valid(ca_v), .a_ready(ca_r), .a_data(ca_d),
    .b_valid(cb_v), .b_ready(cb_r), .b_data(cb_d),
    .out_valid(m_v), .out_ready(m_r), .out_data(m_d), .xfer(o_xfer));

  hs_reg #(.W($bits(acc_tok_t))) u_out_reg (
    .clk, .rst_n, .in_valid(m_v), .in_ready(m_r), .in_data(m_d),
    .out_valid(q_v), .out_ready(q_r), .out_data(q_d));

  // ---- two-input completion: fork to the feedback demux and the adder ----
  assign q_r       = fbi_r && out_ready;
  assign fbi_v     = q_v && out_ready;
  assign out_valid = q_v && fbi_r;
  assign out_data  = q_d;

endmodule
