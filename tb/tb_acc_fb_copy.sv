// tb_acc_fb_copy: one copy of the accumulate feedback circuitry, its
// feed-forward and feedback inputs driven by independent processes with
// random gaps. Output i must hold A1 + A2 = PP1 + PP2 + (multiply only ? 0 :
// FB_A1 + FB_A2) modulo 2^71 for the i-th pair of inputs, with a carry
// word whose LSB is 0 and the sign and control bits passed along. A
// feedback token must be accepted while no feed-forward token is present.
module tb_acc_fb_copy;
  import mac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ffv = 1'b0, ffr, fbv = 1'b0, fbr, ov, orr = 1'b0;
  pp_tok_t ffd;
  logic [1:0][SW-1:0] fbd;
  acc_tok_t od;

  acc_fb_copy dut (.clk, .rst_n, .ff_valid(ffv), .ff_ready(ffr), .ff_data(ffd),
    .fb_valid(fbv), .fb_ready(fbr), .fb_data(fbd), .out_valid(ov), .out_ready(orr), .out_data(od));

  int checks = 0, failures = 0;
  pp_tok_t qf [$];
  logic [1:0][SW-1:0] qb [$];
  int n_out = 0;
  localparam int N = 400;

  function automatic word_t rw();
    return {7'($urandom), $urandom, $urandom};
  endfunction

  always @(negedge clk) if (rst_n) begin
    orr = ($urandom_range(99) >= 30);
    if (ov && orr) begin
      pp_tok_t f; logic [1:0][SW-1:0] b; word_t e;
      checks++;
      f = qf.pop_front(); b = qb.pop_front();
      e = f.pp1 + f.pp2 + (f.ctrl.mpy ? SW'(0) : SW'(b[0] + b[1]));
      if (SW'(od.a1 + od.a2) !== e || od.a2[0] !== 1'b0 || od.msign !== f.msign || od.ctrl !== f.ctrl) begin
        failures++;
        if (failures < 5) $display("FAIL: got %h expected %h", SW'(od.a1 + od.a2), e);
      end
      n_out++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    // feedback alone first
    fbd = '{rw(), rw()}; fbv = 1'b1;
    checks++;
    if (!fbr) begin failures++; $display("FAIL: feedback input not accepted on its own"); end
    qb.push_back(fbd);
    @(negedge clk); fbv = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (ov) begin failures++; $display("FAIL: output without a feed-forward token"); end
    for (int i = 1; i < N; i++) begin
      while ($urandom_range(99) < 40) begin fbv = 1'b0; @(negedge clk); end
      fbd = '{rw(), rw()}; fbv = 1'b1;
      while (!fbr) @(negedge clk);
      qb.push_back(fbd);
      @(negedge clk); fbv = 1'b0;
    end
  end

  initial begin
    pp_tok_t f;
    repeat (2) @(posedge clk);
    @(negedge clk);
    repeat (10) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      while ($urandom_range(99) < 40) begin ffv = 1'b0; @(negedge clk); end
      f.pp1 = rw(); f.pp2 = rw(); f.msign = 1'($urandom_range(1)); f.ctrl = ctrl_t'($urandom);
      ffd = f; ffv = 1'b1;
      while (!ffr) @(negedge clk);
      qf.push_back(f);
      @(negedge clk); ffv = 1'b0;
    end
    while (n_out < N) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
