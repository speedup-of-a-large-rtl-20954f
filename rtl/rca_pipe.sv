// rca_pipe: the feed-forward ripple-carry adder that resolves the
// carry-save accumulator, A_new = A1 + A2 (mod 2^71).
//
// A2 is a carry word, so its bit 0 is 0 and bit 0 of the sum is A1[0]; the
// adder proper covers bits 1..70 (70 bits). It is pipelined into STAGES
// stages of BITS-bit ripple-carry adders, each stage ending in a handshake
// register that carries both words, the sum bits done so far and the
// carry; the multiply sign and control signals travel alongside. Defaults
// follow the document: 70 bits as 35 stages of 2 bits.
// Latency: STAGES clocks; a token can enter every other clock.
module rca_pipe
  import mac_pkg::*;
#(
  parameter int unsigned BITS   = 2,
  parameter int unsigned STAGES = (SW - 1) / BITS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  acc_tok_t in_data,
  output logic     out_valid,
  input  logic     out_ready,
  output sum_tok_t out_data
);

  typedef struct packed {
    word_t a1, a2, s;
    logic  c;
    logic  msign;
    ctrl_t ctrl;
  } st_t;

  st_t          sd [STAGES+1];
  logic [STAGES:0] sv, sr;

  always_comb begin
    sd[0] = '{a1: in_data.a1, a2: in_data.a2, s: '0, c: in_data.a1[0] & in_data.a2[0],
              msign: in_data.msign, ctrl: in_data.ctrl};
    sd[0].s[0] = in_data.a1[0] ^ in_data.a2[0];
  end
  assign sv[0]    = in_valid;
  assign in_ready = sr[0];

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    st_t nx;
    always_comb begin
      nx = sd[k];
      for (int b = 0; b < BITS; b++) begin
        nx.s[1 + k*BITS + b] = nx.a1[1 + k*BITS + b] ^ nx.a2[1 + k*BITS + b] ^ nx.c;
        nx.c = (nx.a1[1 + k*BITS + b] & nx.a2[1 + k*BITS + b]) |
               (nx.c & (nx.a1[1 + k*BITS + b] ^ nx.a2[1 + k*BITS + b]));
      end
    end

    hs_reg #(.W($bits(st_t))) u_reg (
      .clk, .rst_n, .in_valid(sv[k]), .in_ready(sr[k]), .in_data(nx),
      .out_valid(sv[k+1]), .out_ready(sr[k+1]), .out_data(sd[k+1]));
  end

  assign out_valid  = sv[STAGES];
  assign sr[STAGES] = out_ready;
  assign out_data   = '{anew: sd[STAGES].s, msign: sd[STAGES].msign, ctrl: sd[STAGES].ctrl};

endmodule
