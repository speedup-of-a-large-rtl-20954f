// tb_rca_pipe: random carry-save pairs (A2 with a zero LSB, as a carry word
// always has) are streamed through the 35-stage adder; each output must be
// A1 + A2 mod 2^71 with the sign and control bits passed along, in order.
// Long carry chains are forced by also sending all-ones plus one. One
// token through the empty pipeline must take 35 clocks.
module tb_rca_pipe;
  import mac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic iv = 1'b0, ir, ov, orr = 1'b0;
  acc_tok_t id;
  sum_tok_t od;

  rca_pipe dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
                .out_valid(ov), .out_ready(orr), .out_data(od));

  int checks = 0, failures = 0;
  acc_tok_t q [$];
  int n_out = 0, n_in = 0, out_gap = 30;
  longint t_out = 0;

  always @(negedge clk) if (rst_n) begin
    orr = ($urandom_range(99) >= out_gap);
    if (ov && orr) begin
      acc_tok_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
      else begin
        e = q.pop_front();
        if (od.anew !== SW'(e.a1 + e.a2) || od.msign !== e.msign || od.ctrl !== e.ctrl) begin
          failures++;
          if (failures < 5) $display("FAIL: %h + %h gave %h", e.a1, e.a2, od.anew);
        end
      end
      n_out++;
      t_out = $time;
    end
  end

  task automatic push(input acc_tok_t t, input int gap);
    while ($urandom_range(99) < gap) begin iv = 1'b0; @(negedge clk); end
    id = t; iv = 1'b1;
    while (!ir) @(negedge clk);
    q.push_back(t); n_in++;
    @(negedge clk);
    iv = 1'b0;
  endtask

  initial begin
    acc_tok_t t;
    longint t0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    out_gap = 0;
    t = '{a1: '1, a2: SW'(2), msign: 1'b1, ctrl: '{mode: SGN_SU, sub: 1'b1, mpy: 1'b0}};
    t0 = $time;
    push(t, 0);
    while (n_out < n_in) @(negedge clk);
    checks++;
    if ((t_out - t0) / 10 != 35) begin
      failures++; $display("FAIL: latency %0d clocks, expected 35", (t_out - t0) / 10);
    end
    out_gap = 30;
    for (int i = 0; i < 500; i++) begin
      t.a1 = {7'($urandom), $urandom, $urandom};
      t.a2 = {7'($urandom), $urandom, $urandom} & ~SW'(1);
      if (i % 50 == 0) begin t.a1 = '1; t.a2 = SW'(2); end
      t.msign = 1'($urandom_range(1));
      t.ctrl = ctrl_t'($urandom);
      push(t, 20);
    end
    while (n_out < n_in) @(negedge clk);
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
