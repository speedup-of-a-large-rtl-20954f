// ff_multiplier: the feed-forward multiplication pipeline of the MAC.
//
// Stages, in order (each ends in a handshake register, see hs_reg):
//   input register      X, Y and the control signals (68 bits)
//   NCR PP generation   two pp_gen copies behind an NCR demux/mux (ncr_ff):
//                       33 partial-product rows and the multiply sign
//   8 CSA stages        Wallace-tree layers 31(+2 passed)->23->16->11->8->6
//                       ->4->3->2 words
//   NCR 2's complement  two twos_shift copies behind ncr_ff: shift to the
//   and shift           accumulator's binary point, negate for subtract
//   final CSA stage     3 -> 2 words
// The output token carries the product, shifted and signed for the
// accumulator, as two carry-save words PP1 + PP2 (mod 2^71), together with
// the multiply sign and the control signals.
//
// The stage list and the word counts follow the document; the row encoding
// and the shift amounts are this design's (see pp_gen, twos_shift). Latency
// is 12 clocks through empty stages; every stage is a half buffer, and the
// two NCR stages can accept a token every clock.
module ff_multiplier
  import mac_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  mac_in_t in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output pp_tok_t out_data
);

  localparam int unsigned CW = $bits(ctrl_t);

  // Number of words entering CSA stage k (k = NCSA: leaving the last one).
  function automatic int unsigned nw(int unsigned k);
    int unsigned n = NROWS;
    for (int unsigned i = 0; i < k; i++)
      n = (i == 0) ? csa_out_words(n - (NROWS - NPP)) + (NROWS - NPP) : csa_out_words(n);
    return n;
  endfunction

  // ---------------- input register ----------------
  logic    i_v, i_r;
  mac_in_t i_d;

  hs_reg #(.W($bits(mac_in_t))) u_in_reg (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(i_v), .out_ready(i_r), .out_data(i_d));

  // ---------------- NCR partial-product generation ----------------
  localparam int unsigned PGW = NROWS * SW + 1 + CW;

  mac_in_t fa_in, fb_in;
  logic [NROWS-1:0][SW-1:0] rows_a, rows_b;
  logic msign_a, msign_b;

  pp_gen u_pp_a (.x(fa_in.x), .y(fa_in.y), .mode(fa_in.ctrl.mode), .rows(rows_a), .msign(msign_a));
  pp_gen u_pp_b (.x(fb_in.x), .y(fb_in.y), .mode(fb_in.ctrl.mode), .rows(rows_b), .msign(msign_b));

  logic [NROWS-1:0][SW-1:0] wb [NCSA+1];
  logic  [NCSA:0] vb, rb;
  logic  [NCSA:0] mb;
  ctrl_t          cb [NCSA+1];

  ncr_ff #(.IN_W($bits(mac_in_t)), .OUT_W(PGW)) u_ncr_pp (
    .clk, .rst_n,
    .in_valid(i_v), .in_ready(i_r), .in_data(i_d),
    .fa_in, .fa_out({rows_a, msign_a, fa_in.ctrl}),
    .fb_in, .fb_out({rows_b, msign_b, fb_in.ctrl}),
    .out_valid(vb[0]), .out_ready(rb[0]), .out_data({wb[0], mb[0], cb[0]}));

  // ---------------- 8 pipelined CSA stages ----------------
  for (genvar k = 0; k < NCSA; k++) begin : g_csa
    localparam int unsigned NI = nw(k);
    localparam int unsigned NO = nw(k + 1);
    logic [NO-1:0][SW-1:0] sum_words, reg_words;

    csa_layer #(.N(NI), .NPASS(k == 0 ? NROWS - NPP : 0), .W(SW)) u_csa (
      .in_words(wb[k][NI-1:0]), .out_words(sum_words));

    hs_reg #(.W(NO * SW + 1 + CW)) u_reg (
      .clk, .rst_n,
      .in_valid(vb[k]), .in_ready(rb[k]), .in_data({sum_words, mb[k], cb[k]}),
      .out_valid(vb[k+1]), .out_ready(rb[k+1]), .out_data({reg_words, mb[k+1], cb[k+1]}));

    always_comb begin
      wb[k+1] = '0;
      wb[k+1][NO-1:0] = reg_words;
    end
  end

  // ---------------- NCR 2's complement and shift ----------------
  localparam int unsigned TIW = 2 * SW + 1 + CW;
  localparam int unsigned TOW = 3 * SW + 1 + CW;

  logic [1:0][SW-1:0] ta_w, tb_w;
  logic ta_m, tb_m;
  ctrl_t ta_c, tb_c;
  logic [2:0][SW-1:0] ta_o, tb_o, t_words;
  logic  t_v, t_r, t_m;
  ctrl_t t_c;

  twos_shift u_tc_a (.in_words(ta_w), .mode(ta_c.mode), .sub(ta_c.sub), .out_words(ta_o));
  twos_shift u_tc_b (.in_words(tb_w), .mode(tb_c.mode), .sub(tb_c.sub), .out_words(tb_o));

  ncr_ff #(.IN_W(TIW), .OUT_W(TOW)) u_ncr_tc (
    .clk, .rst_n,
    .in_valid(vb[NCSA]), .in_ready(rb[NCSA]), .in_data({wb[NCSA][1:0], mb[NCSA], cb[NCSA]}),
    .fa_in({ta_w, ta_m, ta_c}), .fa_out({ta_o, ta_m, ta_c}),
    .fb_in({tb_w, tb_m, tb_c}), .fb_out({tb_o, tb_m, tb_c}),
    .out_valid(t_v), .out_ready(t_r), .out_data({t_words, t_m, t_c}));

  // ---------------- final CSA stage ----------------
  logic [1:0][SW-1:0] f_words;

  csa_layer #(.N(3), .NPASS(0), .W(SW)) u_csa_final (.in_words(t_words), .out_words(f_words));

  hs_reg #(.W($bits(pp_tok_t))) u_out_reg (
    .clk, .rst_n,
    .in_valid(t_v), .in_ready(t_r), .in_data({f_words[0], f_words[1], t_m, t_c}),
    .out_valid, .out_ready, .out_data);

endmodule
