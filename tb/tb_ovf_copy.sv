// tb_ovf_copy: one copy of the overflow feedback circuitry. For a random
// previous accumulator A (inside the 71-bit range) and a random addend P
// (|P| <= 2^64), the copy receives the low 71 bits of A + P, the sign bit
// of A and a multiply sign / subtract pair whose XOR is the sign of P. The
// 72-bit result must equal A + P (or P alone for multiply only) and the
// overflow bit must be set exactly when that leaves [-2^70, 2^70).
// Operands near the range limits are drawn often, so overflow occurs in
// both directions.
module tb_ovf_copy;
  import mac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ffv = 1'b0, ffr, fbv = 1'b0, fbr, fbd, ov, orr = 1'b0;
  sum_tok_t ffd;
  res_tok_t od;

  ovf_copy dut (.clk, .rst_n, .ff_valid(ffv), .ff_ready(ffr), .ff_data(ffd),
    .fb_valid(fbv), .fb_ready(fbr), .fb_data(fbd), .out_valid(ov), .out_ready(orr), .out_data(od));

  int checks = 0, failures = 0, n_ov = 0;

  initial begin
    logic signed [127:0] a, p, r;
    logic [AW-1:0] ea; bit eo;
    sum_tok_t t;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    orr = 1'b1;
    for (int i = 0; i < 1500; i++) begin
      // previous accumulator, often near the limits
      a = 128'($signed({$urandom, $urandom, $urandom})) >>> 58;   // about +/-2^37
      if ($urandom_range(2) == 0) a = (128'sd1 <<< 70) - 128'($urandom_range(1 << 20)) * (128'sd1 <<< 44);
      if ($urandom_range(3) == 0) a = -a;
      if (a >= (128'sd1 <<< 70)) a = (128'sd1 <<< 70) - 1;
      p = 128'({$urandom, $urandom}) + (($urandom_range(7) == 0) ? (128'sd1 <<< 64) - 128'({$urandom, $urandom}) : 128'sd0);
      if ($urandom_range(9) == 0) p = 0;
      if ($urandom_range(1)) p = -p;
      t.ctrl = '{mode: sign_mode_e'($urandom_range(3)), sub: 1'($urandom_range(1)), mpy: ($urandom_range(7) == 0)};
      t.msign = (p < 0) ^ t.ctrl.sub;
      if (p == 0) t.msign = 1'($urandom_range(1));
      r = (t.ctrl.mpy ? 128'sd0 : a) + p;
      t.anew = r[SW-1:0];
      ea = r[AW-1:0];
      eo = (r >= (128'sd1 <<< 70)) || (r < -(128'sd1 <<< 70));
      ffd = t; ffv = 1'b1; fbd = a[AW-1]; fbv = 1'b1;
      while (!(ffr && fbr)) @(negedge clk);
      @(negedge clk); ffv = 1'b0; fbv = 1'b0;
      while (!ov) @(negedge clk);
      checks++;
      if (od.aout !== ea || od.ov !== eo) begin
        failures++;
        if (failures < 5) $display("FAIL: got %h/%b expected %h/%b", od.aout, od.ov, ea, eo);
      end
      if (eo) n_ov++;
      @(negedge clk);
    end
    checks++;
    if (n_ov == 0) begin failures++; $display("FAIL: no overflow case"); end
    $display("overflow cases: %0d", n_ov);
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
