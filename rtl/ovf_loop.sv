// ovf_loop: the NULL-Cycle-Reduced overflow feedback loop.
//
// The sign bit of each result is needed to compute the sign and overflow of
// the next one, so this is a second feedback loop after the adder. Its
// shape matches acc_fb_loop: a feed-forward demux (Type 1 sequencer) deals
// the adder's tokens alternately to copy A and copy B of ovf_copy; a 1-bit
// feedback demux (Type 2 sequencer, output A reset to DATA0, i.e. a
// positive empty accumulator) deals the previous sign bit; a multiplexer
// (Type 1 sequencer) merges the results in order. Being the last stage of
// the MAC it has no non-functional output register: the multiplexer output
// is the MAC output, and it is handed to the outside and to the feedback
// demux together (two-input completion of the external Ki and the demux's
// request).
module ovf_loop
  import mac_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  sum_tok_t in_data,
  output logic     out_valid,
  input  logic     out_ready,  // Ki
  output res_tok_t out_data
);

  logic ffs1, ffs2, ff_xfer, fbs1, fbs2, fb_xfer, os1, os2, o_xfer;
  logic ffa_v, ffa_r, ffb_v, ffb_r;
  sum_tok_t ffa_d, ffb_d;
  logic fbi_v, fbi_r, fba_v, fba_r, fbb_v, fbb_r, fba_d, fbb_d;
  logic ca_v, ca_r, cb_v, cb_r, m_v, m_r;
  res_tok_t ca_d, cb_d, m_d;

  ncr_sequencer #(.TYPE2(1'b0)) u_seq_ff (.clk, .rst_n, .adv(ff_xfer), .s1(ffs1), .s2(ffs2));

  ncr_demux #(.W($bits(sum_tok_t)), .INIT_DATA0(1'b0)) u_demux_ff (
    .clk, .rst_n, .s1(ffs1), .s2(ffs2),
    .in_valid, .in_ready, .in_data,
    .a_valid(ffa_v), .a_ready(ffa_r), .a_data(ffa_d),
    .b_valid(ffb_v), .b_ready(ffb_r), .b_data(ffb_d),
    .xfer(ff_xfer));

  ncr_sequencer #(.TYPE2(1'b1)) u_seq_fb (.clk, .rst_n, .adv(fb_xfer), .s1(fbs1), .s2(fbs2));

  ncr_demux #(.W(1), .INIT_DATA0(1'b1)) u_demux_fb (
    .clk, .rst_n, .s1(fbs1), .s2(fbs2),
    .in_valid(fbi_v), .in_ready(fbi_r), .in_data(m_d.aout[AW-1]),
    .a_valid(fba_v), .a_ready(fba_r), .a_data(fba_d),
    .b_valid(fbb_v), .b_ready(fbb_r), .b_data(fbb_d),
    .xfer(fb_xfer));

  ovf_copy u_copy_a (
    .clk, .rst_n,
    .ff_valid(ffa_v), .ff_ready(ffa_r), .ff_data(ffa_d),
    .fb_valid(fba_v), .fb_ready(fba_r), .fb_data(fba_d),
    .out_valid(ca_v), .out_ready(ca_r), .out_data(ca_d));

  ovf_copy u_copy_b (
    .clk, .rst_n,
    .ff_valid(ffb_v), .ff_ready(ffb_r), .ff_data(ffb_d),
    .fb_valid(fbb_v), .fb_ready(fbb_r), .fb_data(fbb_d),
    .out_valid(cb_v), .out_ready(cb_r), .out_data(cb_d));

  ncr_sequencer #(.TYPE2(1'b0)) u_seq_out (.clk, .rst_n, .adv(o_xfer), .s1(os1), .s2(os2));

  ncr_mux #(.W($bits(res_tok_t))) u_mux (
    .s1(os1), .s2(os2),
    .a_valid(ca_v), .a_ready(ca_r), .a_data(ca_d),
    .b_valid(cb_v), .b_ready(cb_r), .b_data(cb_d),
    .out_valid(m_v), .out_ready(m_r), .out_data(m_d), .xfer(o_xfer));

  // Two-input completion: the result leaves when both the outside and the
  // feedback demux take it.
  assign m_r       = fbi_r && out_ready;
  assign fbi_v     = m_v && out_ready;
  assign out_valid = m_v && fbi_r;
  assign out_data  = m_d;

endmodule
