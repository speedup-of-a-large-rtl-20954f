// tb_hs_reg: checks the handshake register. A stream of random bytes is
// pushed with random input gaps and random output back-pressure and must
// come out complete and in order; with a free-running producer and
// consumer the register must pass exactly one token every two clocks (the
// DATA/NULL cycle of a half buffer); a register reset full must first
// deliver its reset token.
module tb_hs_reg;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       iv = 1'b0, ir, ov, orr = 1'b0;
  logic [7:0] id = '0, od;
  logic       iv2 = 1'b0, ir2, ov2, or2 = 1'b0;
  logic [7:0] od2;

  hs_reg #(.W(8)) dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
                       .out_valid(ov), .out_ready(orr), .out_data(od));
  hs_reg #(.W(8), .INIT_FULL(1'b1), .INIT_DATA(8'h5A)) dut_init (
    .clk, .rst_n, .in_valid(iv2), .in_ready(ir2), .in_data(8'hC3),
    .out_valid(ov2), .out_ready(or2), .out_data(od2));

  int checks = 0, failures = 0;
  logic [7:0] q [$];
  int n_out = 0, n_in = 0;
  int in_gap = 30, out_gap = 30;

  always @(negedge clk) if (rst_n) begin
    orr = ($urandom_range(99) >= out_gap);
    if (ov && orr) begin
      checks++;
      if (q.size() == 0 || od !== q[0]) begin
        failures++;
        $display("FAIL: got %h expected %h", od, q.size() ? q[0] : 8'h00);
      end
      if (q.size()) void'(q.pop_front());
      n_out++;
    end
  end

  task automatic push(input int n);
    for (int i = 0; i < n; i++) begin
      while ($urandom_range(99) < in_gap) begin iv = 1'b0; @(negedge clk); end
      id = 8'($urandom); iv = 1'b1;
      while (!ir) @(negedge clk);
      q.push_back(id); n_in++;
      @(negedge clk);
      iv = 1'b0;
    end
  endtask

  initial begin
    int t0, t1;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    // reset-full register
    checks++;
    if (!(ov2 && od2 == 8'h5A && !ir2)) begin failures++; $display("FAIL: INIT_FULL token missing"); end
    or2 = 1'b1; @(negedge clk); or2 = 1'b0;
    checks++;
    if (ov2 || !ir2) begin failures++; $display("FAIL: INIT_FULL token not released"); end
    // random traffic
    push(300);
    while (n_out < n_in) @(negedge clk);
    // rate: free-running
    in_gap = 0; out_gap = 0;
    t0 = n_out;
    fork push(100); join_none
    repeat (200) @(negedge clk);
    t1 = n_out;
    checks++;
    if (t1 - t0 < 99 || t1 - t0 > 100) begin
      failures++; $display("FAIL: %0d tokens in 200 clocks, expected 100", t1 - t0);
    end
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
