// tb_ovf_loop: the NCR overflow loop is fed the low 71 bits of a running
// accumulation of random addends (|P| <= 2^64) with random gaps and
// back-pressure, together with the addend's sign. Each output must be the
// full 72-bit accumulator and its overflow bit. Runs of large same-sign
// addends push the sum past +2^70 and below -2^70; the operation after an
// overflow is multiply-only, which restarts the accumulator.
module tb_ovf_loop;
  import mac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic iv = 1'b0, ir, ov, orr = 1'b0;
  sum_tok_t id;
  res_tok_t od;

  ovf_loop dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
                .out_valid(ov), .out_ready(orr), .out_data(od));

  int checks = 0, failures = 0;
  res_tok_t q [$];
  int n_out = 0, n_in = 0, n_ovp = 0, n_ovn = 0, n_b = 0;

  always @(negedge clk) if (rst_n) begin
    orr = ($urandom_range(99) >= 30);
    if (dut.u_copy_b.ff_valid && dut.u_copy_b.ff_ready) n_b++;
    if (ov && orr) begin
      res_tok_t e;
      checks++;
      e = q.pop_front();
      if (od !== e) begin
        failures++;
        if (failures < 5) $display("FAIL result %0d: got %h/%b expected %h/%b", n_out, od.aout, od.ov, e.aout, e.ov);
      end
      if (e.ov && !e.aout[AW-1]) n_ovp++;
      if (e.ov && e.aout[AW-1]) n_ovn++;
      n_out++;
    end
  end

  initial begin
    logic signed [127:0] acc, p;
    sum_tok_t t;
    res_tok_t e;
    bit last_ov;
    int run_sign;
    acc = 0; last_ov = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 900; i++) begin
      run_sign = (i / 150) % 3;   // 0: random, 1: large positive, 2: large negative
      p = 128'({$urandom, $urandom});
      if (run_sign != 0) p = (128'sd1 <<< 64) - 128'($urandom_range(1000));
      if ((run_sign == 0 && $urandom_range(1)) || run_sign == 2) p = -p;
      t.ctrl = '{mode: sign_mode_e'($urandom_range(3)), sub: 1'($urandom_range(1)),
                 mpy: last_ov || (run_sign == 0 && $urandom_range(19) == 0)};
      t.msign = (p < 0) ^ t.ctrl.sub;
      acc = (t.ctrl.mpy ? 128'sd0 : acc) + p;
      t.anew = acc[SW-1:0];
      e.aout = acc[AW-1:0];
      e.ov = (acc >= (128'sd1 <<< 70)) || (acc < -(128'sd1 <<< 70));
      last_ov = e.ov;
      while ($urandom_range(99) < 20) begin iv = 1'b0; @(negedge clk); end
      id = t; iv = 1'b1;
      while (!ir) @(negedge clk);
      q.push_back(e); n_in++;
      @(negedge clk); iv = 1'b0;
    end
    while (n_out < n_in) @(negedge clk);
    checks++;
    if (n_ovp == 0 || n_ovn == 0) begin failures++; $display("FAIL: overflow +%0d -%0d", n_ovp, n_ovn); end
    checks++;
    if (n_b != 450) begin failures++; $display("FAIL: duplicate used %0d times", n_b); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
