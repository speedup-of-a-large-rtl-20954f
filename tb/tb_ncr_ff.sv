// tb_ncr_ff: an NCR-duplicated stage whose function (for both copies) is
// "add 3". Tokens pushed with random gaps and back-pressure must come out
// transformed, complete and in order, alternating between the two copies.
// With a free-running producer and consumer the pair must accept a token
// on (almost) every clock, twice the rate of a single half-buffer stage.
module tb_ncr_ff;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       iv = 1'b0, ir, ov, orr = 1'b0;
  logic [9:0] id = '0, od, fa_in, fb_in;

  ncr_ff #(.IN_W(10), .OUT_W(10)) dut (.clk, .rst_n,
    .in_valid(iv), .in_ready(ir), .in_data(id),
    .fa_in, .fa_out(fa_in + 10'd3), .fb_in, .fb_out(fb_in + 10'd3),
    .out_valid(ov), .out_ready(orr), .out_data(od));

  int checks = 0, failures = 0;
  logic [9:0] q [$];
  int n_out = 0, n_in = 0, n_a = 0, n_b = 0;
  int in_gap = 30, out_gap = 30;

  always @(negedge clk) if (rst_n) begin
    orr = ($urandom_range(99) >= out_gap);
    if (dut.u_reg_a.in_valid && dut.u_reg_a.in_ready) n_a++;
    if (dut.u_reg_b.in_valid && dut.u_reg_b.in_ready) n_b++;
    if (ov && orr) begin
      checks++;
      if (q.size() == 0 || od !== q[0] + 10'd3) begin
        failures++;
        if (failures < 5) $display("FAIL: got %h expected %h", od, q.size() ? q[0] + 10'd3 : 10'h0);
      end
      if (q.size()) void'(q.pop_front());
      n_out++;
    end
  end

  task automatic push(input int n);
    for (int i = 0; i < n; i++) begin
      while ($urandom_range(99) < in_gap) begin iv = 1'b0; @(negedge clk); end
      id = 10'($urandom); iv = 1'b1;
      while (!ir) @(negedge clk);
      q.push_back(id); n_in++;
      @(negedge clk);
      iv = 1'b0;
    end
  endtask

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    push(300);
    while (n_out < n_in) @(negedge clk);
    checks++;
    if (n_a != n_b) begin failures++; $display("FAIL: copies used %0d and %0d times", n_a, n_b); end
    in_gap = 0; out_gap = 0;
    t0 = $time;
    push(100);
    checks++;
    if (($time - t0) / 10 > 102) begin
      failures++; $display("FAIL: 100 tokens took %0d clocks", ($time - t0) / 10);
    end
    while (n_out < n_in) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
