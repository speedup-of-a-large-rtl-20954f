// acc_fb_copy: one copy of the accumulate feedback circuitry (the NCR loop
// holds an original and a duplicate of it).
//
// Four handshake registers:
//   r0  holds the feed-forward token (PP1, PP2, multiply sign, control) and
//       the feedback token (previous accumulator A1, A2 in carry-save form)
//       in two independent halves with separate requests KoFF and KoFB,
//       and releases them together
//   r1  after zeroing A1 and A2 for multiply-only operations
//   r2  after the first CSA: PP1 + PP2 + A1
//   r3  after the second CSA: + A2, giving the new A1 (sum word) and A2
//       (carry word)
// All arithmetic is modulo 2^71; A2's least significant bit is always 0.
// The structure follows the document; the register widths differ from the
// document's because control signals are encoded in binary here.
// Latency: 4 clocks from the later of the two inputs.
module acc_fb_copy
  import mac_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ff_valid,
  output logic               ff_ready,   // KoFF
  input  pp_tok_t            ff_data,
  input  logic               fb_valid,
  output logic               fb_ready,   // KoFB
  input  logic [1:0][SW-1:0] fb_data,    // {A2, A1}
  output logic               out_valid,
  input  logic               out_ready,
  output acc_tok_t           out_data
);

  typedef struct packed {
    word_t pp1, pp2, a1, a2;
    logic  msign;
    ctrl_t ctrl;
  } join_t;

  typedef struct packed {
    word_t s, c, a2;
    logic  msign;
    ctrl_t ctrl;
  } mid_t;

  logic  r0_v, r0_r, r1_v, r1_r, r2_v, r2_r;
  join_t r0_d, z_d, r1_d;
  mid_t  c1_d, r2_d;
  logic [1:0][SW-1:0] csa1_o, csa2_o;

  // r0 takes the two inputs independently (in NCL its feed-forward and
  // feedback bits latch on their own, bit-wise), and passes them on
  // together once both are present.
  logic    ffr_v, fbr_v;
  pp_tok_t ffr_d;
  logic [1:0][SW-1:0] fbr_d;

  hs_reg #(.W($bits(pp_tok_t))) u_r0_ff (
    .clk, .rst_n, .in_valid(ff_valid), .in_ready(ff_ready), .in_data(ff_data),
    .out_valid(ffr_v), .out_ready(r0_r && fbr_v), .out_data(ffr_d));

  hs_reg #(.W(2 * SW)) u_r0_fb (
    .clk, .rst_n, .in_valid(fb_valid), .in_ready(fb_ready), .in_data(fb_data),
    .out_valid(fbr_v), .out_ready(r0_r && ffr_v), .out_data(fbr_d));

  assign r0_v = ffr_v && fbr_v;
  assign r0_d = '{pp1: ffr_d.pp1, pp2: ffr_d.pp2, a1: fbr_d[0], a2: fbr_d[1],
                  msign: ffr_d.msign, ctrl: ffr_d.ctrl};

  // Zero A1 and A2 for multiply only.
  always_comb begin
    z_d = r0_d;
    if (r0_d.ctrl.mpy) begin
      z_d.a1 = '0;
      z_d.a2 = '0;
    end
  end

  hs_reg #(.W($bits(join_t))) u_r1 (
    .clk, .rst_n, .in_valid(r0_v), .in_ready(r0_r), .in_data(z_d),
    .out_valid(r1_v), .out_ready(r1_r), .out_data(r1_d));

  csa_layer #(.N(3), .NPASS(0), .W(SW)) u_csa1 (
    .in_words({r1_d.a1, r1_d.pp2, r1_d.pp1}), .out_words(csa1_o));

  assign c1_d = '{s: csa1_o[0], c: csa1_o[1], a2: r1_d.a2, msign: r1_d.msign, ctrl: r1_d.ctrl};

  hs_reg #(.W($bits(mid_t))) u_r2 (
    .clk, .rst_n, .in_valid(r1_v), .in_ready(r1_r), .in_data(c1_d),
    .out_valid(r2_v), .out_ready(r2_r), .out_data(r2_d));

  csa_layer #(.N(3), .NPASS(0), .W(SW)) u_csa2 (
    .in_words({r2_d.a2, r2_d.c, r2_d.s}), .out_words(csa2_o));

  acc_tok_t c2_d;
  assign c2_d = '{a1: csa2_o[0], a2: csa2_o[1], msign: r2_d.msign, ctrl: r2_d.ctrl};

  hs_reg #(.W($bits(acc_tok_t))) u_r3 (
    .clk, .rst_n, .in_valid(r2_v), .in_ready(r2_r), .in_data(c2_d),
    .out_valid, .out_ready, .out_data);

endmodule
