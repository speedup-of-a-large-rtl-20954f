// ncr_ff: NULL Cycle Reduction of one feed-forward pipeline stage.
//
// A Type 1 sequencer and demultiplexer deal incoming tokens alternately to
// two copies of the stage (A = original, B = duplicate); a second Type 1
// sequencer and a multiplexer collect the copies' outputs in the same
// order. In NCL this lets one copy take its NULL wavefront while the other
// processes DATA; here each copy's output register is a half buffer, so the
// pair can accept a token on every clock where one copy alone could accept
// one every other clock.
//
// The stage's combinational function lives outside this module: the parent
// connects fa_in -> function -> fa_out for copy A and fb_in -> fb_out for
// copy B (two instances of the same function). Latency: one clock.
module ncr_ff #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [IN_W-1:0]  in_data,
  output logic [IN_W-1:0]  fa_in,
  input  logic [OUT_W-1:0] fa_out,
  output logic [IN_W-1:0]  fb_in,
  input  logic [OUT_W-1:0] fb_out,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [OUT_W-1:0] out_data
);

  logic in_s1, in_s2, in_xfer, out_s1, out_s2, out_xfer;
  logic a_v, a_r, b_v, b_r;
  logic ra_v, ra_r, rb_v, rb_r;
  logic [OUT_W-1:0] ra_d, rb_d;

  ncr_sequencer #(.TYPE2(1'b0)) u_seq_in (
    .clk, .rst_n, .adv(in_xfer), .s1(in_s1), .s2(in_s2));

  ncr_demux #(.W(IN_W), .INIT_DATA0(1'b0)) u_demux (
    .clk, .rst_n, .s1(in_s1), .s2(in_s2),
    .in_valid, .in_ready, .in_data,
    .a_valid(a_v), .a_ready(a_r), .a_data(fa_in),
    .b_valid(b_v), .b_ready(b_r), .b_data(fb_in),
    .xfer(in_xfer));

  hs_reg #(.W(OUT_W)) u_reg_a (
    .clk, .rst_n, .in_valid(a_v), .in_ready(a_r), .in_data(fa_out),
    .out_valid(ra_v), .out_ready(ra_r), .out_data(ra_d));

  hs_reg #(.W(OUT_W)) u_reg_b (
    .clk, .rst_n, .in_valid(b_v), .in_ready(b_r), .in_data(fb_out),
    .out_valid(rb_v), .out_ready(rb_r), .out_data(rb_d));

  ncr_sequencer #(.TYPE2(1'b0)) u_seq_out (
    .clk, .rst_n, .adv(out_xfer), .s1(out_s1), .s2(out_s2));

  ncr_mux #(.W(OUT_W)) u_mux (
    .s1(out_s1), .s2(out_s2),
    .a_valid(ra_v), .a_ready(ra_r), .a_data(ra_d),
    .b_valid(rb_v), .b_ready(rb_r), .b_data(rb_d),
    .out_valid, .out_ready, .out_data, .xfer(out_xfer));

endmodule
