// tb_ff_multiplier: random operations (all modes, add and subtract) are
// streamed through the multiplier with random gaps and back-pressure. Each
// output must satisfy PP1 + PP2 = +/-(X*Y) * 2^k (mod 2^71), carry the
// operand sign of X*Y and the unchanged control signals, and come out in
// order. A single operation through the empty pipeline must take 12 clocks
// (input register, PP generation, 8 CSA stages, 2's complement, final CSA).
module tb_ff_multiplier;
  import mac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic iv = 1'b0, ir, ov, orr = 1'b0;
  mac_in_t id;
  pp_tok_t od;

  ff_multiplier dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
                     .out_valid(ov), .out_ready(orr), .out_data(od));

  int checks = 0, failures = 0;
  mac_in_t q [$];
  int n_out = 0, n_in = 0, out_gap = 30;
  longint t_out = 0;

  function automatic logic [SW-1:0] expect_pp(mac_in_t op);
    logic signed [127:0] xv, yv, p;
    xv = (op.ctrl.mode == SGN_SS || op.ctrl.mode == SGN_SU) ? 128'($signed(op.x)) : {96'd0, op.x};
    yv = (op.ctrl.mode == SGN_SS) ? 128'($signed(op.y)) : {96'd0, op.y};
    p = xv * yv;
    if (op.ctrl.mode == SGN_SS)      p = p <<< 2;
    else if (op.ctrl.mode == SGN_SU) p = p <<< 1;
    if (op.ctrl.sub) p = -p;
    return p[SW-1:0];
  endfunction

  always @(negedge clk) if (rst_n) begin
    orr = ($urandom_range(99) >= out_gap);
    if (ov && orr) begin
      mac_in_t e;
      logic xs, ys;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
      else begin
        e = q.pop_front();
        xs = (e.ctrl.mode == SGN_SS || e.ctrl.mode == SGN_SU) && e.x[31];
        ys = (e.ctrl.mode == SGN_SS) && e.y[31];
        if (SW'(od.pp1 + od.pp2) !== expect_pp(e) || od.msign !== (xs ^ ys) || od.ctrl !== e.ctrl) begin
          failures++;
          if (failures < 5) $display("FAIL: x=%h y=%h ctrl=%b got %h expected %h", e.x, e.y, e.ctrl,
                                     SW'(od.pp1 + od.pp2), expect_pp(e));
        end
      end
      n_out++;
      t_out = $time;
    end
  end

  task automatic push(input mac_in_t op, input int gap);
    while ($urandom_range(99) < gap) begin iv = 1'b0; @(negedge clk); end
    id = op; iv = 1'b1;
    while (!ir) @(negedge clk);
    q.push_back(op); n_in++;
    @(negedge clk);
    iv = 1'b0;
  endtask

  initial begin
    mac_in_t op;
    longint t0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    // latency of one operation through the empty pipeline
    out_gap = 0;
    op = '{x: 32'h80000000, y: 32'h80000000, ctrl: '{mode: SGN_SS, sub: 1'b0, mpy: 1'b0}};
    t0 = $time;
    push(op, 0);
    while (n_out < n_in) @(negedge clk);
    checks++;
    if ((t_out - t0) / 10 != 12) begin
      failures++; $display("FAIL: latency %0d clocks, expected 12", (t_out - t0) / 10);
    end
    out_gap = 30;
    for (int i = 0; i < 600; i++) begin
      op.x = $urandom; op.y = $urandom;
      op.ctrl = '{mode: sign_mode_e'($urandom_range(3)), sub: 1'($urandom_range(1)), mpy: 1'($urandom_range(1))};
      push(op, 20);
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
