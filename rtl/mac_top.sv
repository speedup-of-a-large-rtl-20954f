// mac_top: 72 + 32x32 multiply-accumulate unit with carry-save accumulate
// feedback.
//
// Each operation multiplies two 32-bit fractions X and Y (signed x signed,
// signed x unsigned or unsigned x unsigned), and adds the product to the
// 72-bit accumulator, subtracts it, or (multiply only) replaces the
// accumulator with +/- the product. Every operation returns the new
// accumulator Aout and an overflow flag OV.
//
// Dataflow:
//   ff_multiplier  X*Y as two carry-save words, shifted and signed
//   acc_fb_loop    NCR feedback loop keeping the accumulator in carry-save
//                  form (two CSAs, no carry propagation in the loop)
//   rca_pipe       70-bit ripple-carry adder pipelined 35 x 2 bits
//   ovf_loop       NCR feedback loop that rebuilds bit 71 and the overflow
//                  flag from the previous result's sign
// The original is a delay-insensitive NULL Convention Logic circuit; this
// RTL is a clocked rendering in which each NCL register is a handshake
// register (hs_reg): in_valid/in_ready stand for the DATA wavefront and
// the completion output Ko, out_valid/out_ready for the wavefront out and
// the Ki request. Operations are accepted in order and results leave in
// order; the accumulator starts at zero after reset.
// Ports: in_* accepts one operation per handshake; out_* returns one
// result per operation; both are ordinary valid/ready handshakes.
module mac_top
  import mac_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [XW-1:0] x,
  input  logic [XW-1:0] y,
  input  sign_mode_e    sign_mode,   // Sign
  input  logic          add_sub,     // 1 = subtract the product
  input  logic          mac_mpy,     // 1 = multiply only
  output logic          out_valid,
  input  logic          out_ready,
  output logic [AW-1:0] aout,
  output logic          ov
);

  mac_in_t  op;
  logic     pp_v, pp_r, acc_v, acc_r, sum_v, sum_r;
  pp_tok_t  pp_d;
  acc_tok_t acc_d;
  sum_tok_t sum_d;
  res_tok_t res_d;

  assign op = '{x: x, y: y, ctrl: '{mode: sign_mode, sub: add_sub, mpy: mac_mpy}};

  ff_multiplier u_mult (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(op),
    .out_valid(pp_v), .out_ready(pp_r), .out_data(pp_d));

  acc_fb_loop u_acc (
    .clk, .rst_n, .in_valid(pp_v), .in_ready(pp_r), .in_data(pp_d),
    .out_valid(acc_v), .out_ready(acc_r), .out_data(acc_d));

  rca_pipe u_rca (
    .clk, .rst_n, .in_valid(acc_v), .in_ready(acc_r), .in_data(acc_d),
    .out_valid(sum_v), .out_ready(sum_r), .out_data(sum_d));

  ovf_loop u_ovf (
    .clk, .rst_n, .in_valid(sum_v), .in_ready(sum_r), .in_data(sum_d),
    .out_valid, .out_ready, .out_data(res_d));

  assign aout = res_d.aout;
  assign ov   = res_d.ov;

endmodule
