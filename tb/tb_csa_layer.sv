// tb_csa_layer: the first Wallace-tree layer of the multiplier (33 words,
// the last 2 passed through, giving 23) and a plain 3-word layer (giving
// 2) are fed random 71-bit words; the output words must add up to the same
// value as the input words modulo 2^71, the passed words must appear
// unchanged, and carry words must have a zero least significant bit.
module tb_csa_layer;
  localparam int unsigned W = 71;
  logic [32:0][W-1:0] a_in;
  logic [22:0][W-1:0] a_out;
  logic [2:0][W-1:0]  b_in;
  logic [1:0][W-1:0]  b_out;

  csa_layer #(.N(33), .NPASS(2), .W(W)) dut_a (.in_words(a_in), .out_words(a_out));
  csa_layer #(.N(3), .NPASS(0), .W(W)) dut_b (.in_words(b_in), .out_words(b_out));

  int checks = 0, failures = 0;

  function automatic logic [W-1:0] rnd();
    return {7'($urandom), $urandom, $urandom};
  endfunction

  initial begin
    logic [W-1:0] si, so;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 33; i++) a_in[i] = ($urandom_range(3) == 0) ? '0 : rnd();
      for (int i = 0; i < 3; i++)  b_in[i] = rnd();
      #1;
      si = '0; so = '0;
      for (int i = 0; i < 33; i++) si += a_in[i];
      for (int i = 0; i < 23; i++) so += a_out[i];
      checks++;
      if (si !== so) begin failures++; if (failures < 5) $display("FAIL: 33-word layer sum"); end
      checks++;
      if (a_out[21] !== a_in[31] || a_out[22] !== a_in[32] || a_out[20] !== a_in[30]) begin
        failures++; if (failures < 5) $display("FAIL: passed words");
      end
      checks++;
      if (a_out[1][0] !== 1'b0) begin failures++; $display("FAIL: carry word LSB"); end
      checks++;
      if (b_out[0] + b_out[1] !== W'(b_in[0] + b_in[1] + b_in[2])) begin
        failures++; if (failures < 5) $display("FAIL: 3-word layer sum");
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
