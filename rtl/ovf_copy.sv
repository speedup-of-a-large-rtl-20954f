// ovf_copy: one copy of the overflow feedback circuitry (the NCR loop holds
// an original and a duplicate of it).
//
// Inputs are the new low accumulator bits A_new[70:0] with the multiply
// sign and control signals (feed-forward), and the sign bit of the previous
// result (feedback). Three handshake registers:
//   r0  holds the two inputs in independent halves (separate requests
//       KoFF and KoFB) and releases them together
//   r1  after "calculate accumulate sign": the previous sign, forced to 0
//       for multiply only (no overflow is possible then)
//   r2  after "calculate overflow": the 72-bit result and the overflow bit
// With a = previous sign, p = sign of the addend (multiply sign XOR
// subtract) and s = A_new[70]:
//   a == p : sign = a, overflow = (s != a)   (like signs: check the result)
//   a != p : sign = s, overflow = 0          (unlike signs cannot overflow)
// Result = {sign, A_new}. This is exact while every earlier result was in
// the 71-bit range. After an overflow, same-signed additions stay exact in
// 72 bits, but an addend of the opposite sign may not, so the accumulator
// should be restarted with a multiply-only operation. The operand mode
// (Sign) enters only through the multiply sign, which is 0 for unsigned
// operands. The document names the two functions and
// their inputs; the equations are this design's.
// Latency: 3 clocks from the later of the two inputs.
module ovf_copy
  import mac_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ff_valid,
  output logic     ff_ready,   // KoFF
  input  sum_tok_t ff_data,
  input  logic     fb_valid,
  output logic     fb_ready,   // KoFB
  input  logic     fb_data,    // MSB of the previous result
  output logic     out_valid,
  input  logic     out_ready,
  output res_tok_t out_data
);

  typedef struct packed {
    logic  msb;
    word_t anew;
    logic  msign;
    ctrl_t ctrl;
  } ov_tok_t;

  logic    r0_v, r0_r, r1_v, r1_r;
  ov_tok_t r0_d, as_d, r1_d;
  res_tok_t ov_d;

  // r0 takes the two inputs independently and releases them together.
  logic     ffr_v, fbr_v, fbr_d;
  sum_tok_t ffr_d;

  hs_reg #(.W($bits(sum_tok_t))) u_r0_ff (
    .clk, .rst_n, .in_valid(ff_valid), .in_ready(ff_ready), .in_data(ff_data),
    .out_valid(ffr_v), .out_ready(r0_r && fbr_v), .out_data(ffr_d));

  hs_reg #(.W(1)) u_r0_fb (
    .clk, .rst_n, .in_valid(fb_valid), .in_ready(fb_ready), .in_data(fb_data),
    .out_valid(fbr_v), .out_ready(r0_r && ffr_v), .out_data(fbr_d));

  assign r0_v = ffr_v && fbr_v;
  assign r0_d = '{msb: fbr_d, anew: ffr_d.anew, msign: ffr_d.msign, ctrl: ffr_d.ctrl};

  // Calculate accumulate sign.
  always_comb begin
    as_d = r0_d;
    as_d.msb = r0_d.msb && !r0_d.ctrl.mpy;
  end

  hs_reg #(.W($bits(ov_tok_t))) u_r1 (
    .clk, .rst_n, .in_valid(r0_v), .in_ready(r0_r), .in_data(as_d),
    .out_valid(r1_v), .out_ready(r1_r), .out_data(r1_d));

  // Calculate overflow.
  logic a, p, s;
  always_comb begin
    a = r1_d.msb;
    p = r1_d.msign ^ r1_d.ctrl.sub;
    s = r1_d.anew[SW-1];
    ov_d.aout = {(a == p) ? a : s, r1_d.anew};
    ov_d.ov   = (a == p) && (s != a);
  end

  hs_reg #(.W($bits(res_tok_t))) u_r2 (
    .clk, .rst_n, .in_valid(r1_v), .in_ready(r1_r), .in_data(ov_d),
    .out_valid, .out_ready, .out_data);

endmodule
