// tb_ncr_sequencer: a Type 1 and a Type 2 sequencer are stepped at random;
// after reset Type 1 must select A (s1) and Type 2 must select B (s2), each
// step must swap the selection, and s1/s2 must always be complementary.
module tb_ncr_sequencer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic adv = 1'b0, s1a, s2a, s1b, s2b;
  ncr_sequencer #(.TYPE2(1'b0)) dut1 (.clk, .rst_n, .adv, .s1(s1a), .s2(s2a));
  ncr_sequencer #(.TYPE2(1'b1)) dut2 (.clk, .rst_n, .adv, .s1(s1b), .s2(s2b));

  int checks = 0, failures = 0;
  bit m1 = 1'b0, m2 = 1'b1;   // model: 1 = B selected

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      checks++;
      if (s2a !== m1 || s1a !== !m1 || s2b !== m2 || s1b !== !m2) begin
        failures++;
        $display("FAIL step %0d: type1 s1s2=%b%b type2 s1s2=%b%b", i, s1a, s2a, s1b, s2b);
      end
      adv = 1'($urandom_range(1));
      @(negedge clk);
      if (adv) begin m1 = !m1; m2 = !m2; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
