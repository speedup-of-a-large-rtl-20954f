// tb_mac_top: end-to-end test of the whole MAC at its default size.
//
// Phase 1 runs the reference accumulation
//     Aout = sum_{i=0..255} X_i * Y_i,  X_i = X_0 + 2^-21 i,  Y_i = Y_0 + 2^-11 i,
// with X_0 = A61C039Dh and Y_0 = F0046718h, signed x signed, starting from
// the accumulator's reset value of zero. Phase 2 drives random operations
// (all operand modes, add, subtract, multiply only) with random gaps at the
// input and random back-pressure at the output. Phase 3 drives the
// accumulator past +64.0 and below -64.0 with runs of same-signed
// products (which stay exact in 72 bits, with the overflow flag set), and
// restarts it with a multiply-only operation after each run.
// Every result is compared with a 128-bit integer model. The latency of
// one operation through the idle pipeline must be 55 clocks (multiplier 12,
// accumulate loop 5, adder 35, overflow loop 3), and the reference workload
// must run at one operation per 5 clocks (the accumulate loop's round trip). The test also
// counts how often each mechanism occurred (both copies of all four NCR
// stages, the reset DATA0 tokens, output stalls, overflow in both
// directions, every mode) and fails if one never did.
module tb_mac_top;
  import mac_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, ov;
  logic [31:0]   x = '0, y = '0;
  sign_mode_e    sign_mode = SGN_SS;
  logic          add_sub = 1'b0, mac_mpy = 1'b0;
  logic [71:0]   aout;

  mac_top dut (.*);

  int checks = 0, failures = 0;

  // ---------------- reference model ----------------
  logic signed [127:0] ref_acc = '0;
  logic [71:0] exp_q [$];
  bit          exp_ov_q [$];
  bit          last_ov = 1'b0;

  function automatic void model(input logic [31:0] xa, ya, input logic [1:0] m,
                                input bit sub, mpy, output logic [71:0] a, output bit o);
    logic signed [127:0] xv, yv, p, r;
    xv = (m == 2'd0 || m == 2'd1) ? 128'($signed(xa)) : {96'd0, xa};
    yv = (m == 2'd0) ? 128'($signed(ya)) : {96'd0, ya};
    p  = xv * yv;
    if (m == 2'd0)      p = p <<< 2;
    else if (m == 2'd1) p = p <<< 1;
    if (sub) p = -p;
    r = (mpy ? 128'sd0 : ref_acc) + p;
    a = r[71:0];
    o = (r >= (128'sd1 <<< 70)) || (r < -(128'sd1 <<< 70));
    ref_acc = r;
  endfunction

  // ---------------- monitor ----------------
  // Everything is driven and sampled on the falling edge: a valid/ready pair
  // seen high there is a transfer at the next rising edge.
  int n_ncr_pp_b = 0, n_ncr_tc_b = 0, n_acc_b = 0, n_ovf_b = 0;
  int n_acc_init = 0, n_ovf_init = 0, n_stall = 0, n_ov_pos = 0, n_ov_neg = 0;
  int n_mode [3] = '{0, 0, 0};
  int n_sub = 0, n_mpy = 0, n_in_stall = 0;
  int n_out = 0;
  int bp_pct = 0;
  logic [71:0] last_aout;
  longint t_issue, t_first, t_last_out;

  always @(negedge clk) if (rst_n) begin
    logic [71:0] ea; bit eo;
    out_ready = ($urandom_range(99) >= bp_pct);
    if (dut.u_mult.u_ncr_pp.u_demux.b_valid && dut.u_mult.u_ncr_pp.u_demux.b_ready) n_ncr_pp_b++;
    if (dut.u_mult.u_ncr_tc.u_demux.b_valid && dut.u_mult.u_ncr_tc.u_demux.b_ready) n_ncr_tc_b++;
    if (dut.u_acc.u_demux_ff.b_valid && dut.u_acc.u_demux_ff.b_ready) n_acc_b++;
    if (dut.u_ovf.u_demux_ff.b_valid && dut.u_ovf.u_demux_ff.b_ready) n_ovf_b++;
    if (dut.u_acc.u_demux_fb.init_pend && dut.u_acc.u_demux_fb.a_ready) n_acc_init++;
    if (dut.u_ovf.u_demux_fb.init_pend && dut.u_ovf.u_demux_fb.a_ready) n_ovf_init++;
    if (out_valid && !out_ready) n_stall++;
    if (in_valid && !in_ready) n_in_stall++;
    if (out_valid && out_ready) begin
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result %h", aout);
      end else begin
        ea = exp_q.pop_front(); eo = exp_ov_q.pop_front();
        checks++;
        if (aout !== ea || ov !== eo) begin
          failures++;
          if (failures < 10)
            $display("FAIL result %0d: aout=%h ov=%b expected %h ov=%b", n_out, aout, ov, ea, eo);
        end
        if (eo && ea[71] == 1'b0) n_ov_pos++;
        if (eo && ea[71] == 1'b1) n_ov_neg++;
      end
      last_aout = aout;
      t_last_out = $time;
      n_out++;
    end
  end

  // ---------------- driver ----------------
  // Called at a falling edge; returns at the falling edge after the transfer.
  int n_issued = 0;
  task automatic issue(input logic [31:0] xa, ya, input logic [1:0] m, input bit sub, mpy,
                       input int gap_pct);
    logic [71:0] a; bit o;
    while ($urandom_range(99) < gap_pct) begin
      in_valid = 1'b0;
      @(negedge clk);
    end
    model(xa, ya, m, sub, mpy, a, o);
    exp_q.push_back(a); exp_ov_q.push_back(o);
    last_ov = o;
    n_mode[(m == 2'd3) ? 2 : m]++;
    if (sub) n_sub++;
    if (mpy) n_mpy++;
    x = xa; y = ya; sign_mode = sign_mode_e'(m); add_sub = sub; mac_mpy = mpy;
    in_valid = 1'b1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
    n_issued++;
  endtask

  task automatic drain();
    while (n_out < n_issued) @(negedge clk);
  endtask

  initial begin
    logic [31:0] x0, y0;
    real final_val;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Phase 0: latency of one operation through the idle pipeline.
    t_issue = $time;
    issue(32'h40000000, 32'h40000000, 2'd0, 1'b0, 1'b1, 0);
    drain();
    $display("latency %0d clocks", (t_last_out - t_issue) / 10);
    checks++;
    if ((t_last_out - t_issue) / 10 != 55) begin failures++; $display("FAIL: latency is not 12+5+35+3 = 55 clocks"); end

    // Phase 1: the reference workload, back to back, no back-pressure.
    t_first = $time;
    x0 = 32'hA61C039D; y0 = 32'hF0046718;
    for (int i = 0; i <= 255; i++)
      issue(x0 + 32'(i << 10), y0 + 32'(i << 20), 2'd0, 1'b0, 1'b0, 0);
    drain();
    $display("256 operations in %0d clocks", (t_last_out - t_first) / 10);
    checks++;
    if ((t_last_out - t_first) / 10 > 55 + 255 * 5) begin
      failures++; $display("FAIL: accumulate loop slower than one operation per 5 clocks");
    end
    final_val = $itor($signed(last_aout[71:40])) / 16777216.0;
    $display("reference workload: Aout = %h (about %f)", last_aout, final_val);

    // Phase 2: random operations, gaps and back-pressure.
    bp_pct = 30;
    for (int i = 0; i < 400; i++) begin
      bit mpy;
      mpy = ($urandom_range(9) == 0) || last_ov;
      issue($urandom, $urandom, 2'($urandom_range(3)), 1'($urandom_range(1)), mpy, 20);
    end
    drain();

    // Phase 3: overflow upwards, then downwards.
    bp_pct = 10;
    issue(32'h80000000, 32'h80000000, 2'd0, 1'b0, 1'b1, 0);          // +1.0, restart
    for (int i = 0; i < 66; i++)
      issue(32'h80000000, 32'h80000000, 2'd0, 1'b0, 1'b0, 0);        // +1.0 each
    issue(32'h80000000, 32'h80000000, 2'd0, 1'b1, 1'b1, 0);          // -1.0, restart
    for (int i = 0; i < 66; i++)
      issue(32'hFFFFFFFF, 32'hFFFFFFFF, 2'd2, 1'b1, 1'b0, 0);        // about -1.0 each
    issue(32'h40000000, 32'h40000000, 2'd0, 1'b0, 1'b1, 0);          // restart
    drain();

    // Mechanism coverage.
    checks++; if (n_ncr_pp_b == 0) begin failures++; $display("FAIL: PP-generation duplicate never used"); end
    checks++; if (n_ncr_tc_b == 0) begin failures++; $display("FAIL: 2's-complement duplicate never used"); end
    checks++; if (n_acc_b == 0)    begin failures++; $display("FAIL: accumulate duplicate never used"); end
    checks++; if (n_ovf_b == 0)    begin failures++; $display("FAIL: overflow duplicate never used"); end
    checks++; if (n_acc_init != 1) begin failures++; $display("FAIL: accumulate DATA0 token taken %0d times", n_acc_init); end
    checks++; if (n_ovf_init != 1) begin failures++; $display("FAIL: overflow DATA0 token taken %0d times", n_ovf_init); end
    checks++; if (n_stall == 0)    begin failures++; $display("FAIL: no output stall"); end
    checks++; if (n_in_stall == 0) begin failures++; $display("FAIL: no input stall"); end
    checks++; if (n_ov_pos == 0)   begin failures++; $display("FAIL: no positive overflow"); end
    checks++; if (n_ov_neg == 0)   begin failures++; $display("FAIL: no negative overflow"); end
    checks++; if (n_sub == 0 || n_mpy == 0) begin failures++; $display("FAIL: subtract or multiply-only missing"); end
    checks++; if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0) begin failures++; $display("FAIL: a mode missing"); end
    $display("mechanisms: ncr_pp_b=%0d ncr_tc_b=%0d acc_b=%0d ovf_b=%0d acc_init=%0d ovf_init=%0d stalls=%0d in_stalls=%0d ov+=%0d ov-=%0d sub=%0d mpy=%0d modes=%0d/%0d/%0d",
             n_ncr_pp_b, n_ncr_tc_b, n_acc_b, n_ovf_b, n_acc_init, n_ovf_init, n_stall, n_in_stall,
             n_ov_pos, n_ov_neg, n_sub, n_mpy, n_mode[0], n_mode[1], n_mode[2]);
    $display("operations=%0d results=%0d", n_issued, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
