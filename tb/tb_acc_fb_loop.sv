// tb_acc_fb_loop: carry-save products are streamed into the NCR accumulate
// loop with random gaps and back-pressure. Output i must hold, in
// carry-save form, the running sum of the products modulo 2^71, starting
// from zero after reset and restarting at each multiply-only operation.
// Both copies must be used equally, and the DATA0 reset token exactly once.
module tb_acc_fb_loop;
  import mac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic iv = 1'b0, ir, ov, orr = 1'b0;
  pp_tok_t id;
  acc_tok_t od;

  acc_fb_loop dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
                   .out_valid(ov), .out_ready(orr), .out_data(od));

  int checks = 0, failures = 0;
  word_t q [$];
  word_t acc = '0;
  int n_out = 0, n_in = 0, n_a = 0, n_b = 0, n_init = 0;

  function automatic word_t rw();
    return {7'($urandom), $urandom, $urandom};
  endfunction

  always @(negedge clk) if (rst_n) begin
    orr = ($urandom_range(99) >= 30);
    if (dut.u_copy_a.ff_valid && dut.u_copy_a.ff_ready) n_a++;
    if (dut.u_copy_b.ff_valid && dut.u_copy_b.ff_ready) n_b++;
    if (dut.u_demux_fb.init_pend && dut.u_demux_fb.a_ready) n_init++;
    if (ov && orr) begin
      word_t e;
      checks++;
      e = q.pop_front();
      if (SW'(od.a1 + od.a2) !== e) begin
        failures++;
        if (failures < 5) $display("FAIL result %0d: got %h expected %h", n_out, SW'(od.a1 + od.a2), e);
      end
      n_out++;
    end
  end

  initial begin
    pp_tok_t t;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      while ($urandom_range(99) < 20) begin iv = 1'b0; @(negedge clk); end
      t.pp1 = rw(); t.pp2 = rw() & ~SW'(1); t.msign = 1'($urandom_range(1));
      t.ctrl = '{mode: sign_mode_e'($urandom_range(3)), sub: 1'($urandom_range(1)),
                 mpy: ($urandom_range(9) == 0)};
      acc = (t.ctrl.mpy ? SW'(0) : acc) + t.pp1 + t.pp2;
      id = t; iv = 1'b1;
      while (!ir) @(negedge clk);
      q.push_back(acc); n_in++;
      @(negedge clk); iv = 1'b0;
    end
    while (n_out < n_in) @(negedge clk);
    checks++;
    if (n_a != 250 || n_b != 250) begin failures++; $display("FAIL: copies used %0d/%0d times", n_a, n_b); end
    checks++;
    if (n_init != 1) begin failures++; $display("FAIL: DATA0 token used %0d times", n_init); end
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
