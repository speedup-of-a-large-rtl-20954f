// tb_twos_shift: random carry-save pairs in every mode, with add and
// subtract; the three output words must add up, modulo 2^71, to
// +/-(w0 + w1) * 2^k with k = 2, 1, 0 for signed x signed, signed x
// unsigned and unsigned x unsigned.
module tb_twos_shift;
  import mac_pkg::*;
  logic [1:0][SW-1:0] w;
  logic [2:0][SW-1:0] o;
  sign_mode_e mode;
  logic sub;

  twos_shift dut (.in_words(w), .mode, .sub, .out_words(o));

  int checks = 0, failures = 0;

  initial begin
    logic [SW-1:0] e;
    int k;
    for (int t = 0; t < 3000; t++) begin
      w[0] = {7'($urandom), $urandom, $urandom};
      w[1] = {7'($urandom), $urandom, $urandom};
      mode = sign_mode_e'($urandom_range(3));
      sub  = 1'($urandom_range(1));
      #1;
      k = (mode == SGN_SS) ? 2 : (mode == SGN_SU) ? 1 : 0;
      e = (w[0] + w[1]) * (SW'(1) << k);
      if (sub) e = -e;
      checks++;
      if (SW'(o[0] + o[1] + o[2]) !== e) begin
        failures++;
        if (failures < 5) $display("FAIL: mode=%0d sub=%b", mode, sub);
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
