// tb_ncr_mux: drives the NCR multiplexer with random inputs and selections
// and checks that the output follows the selected side only, that ready
// goes back to that side only, and that transfers are flagged.
module tb_ncr_mux;
  logic s1, s2, av, bv, orr, ar, br, ov, xf;
  logic [11:0] ad, bd, od;

  ncr_mux #(.W(12)) dut (.s1, .s2, .a_valid(av), .a_ready(ar), .a_data(ad),
    .b_valid(bv), .b_ready(br), .b_data(bd), .out_valid(ov), .out_ready(orr), .out_data(od), .xfer(xf));

  int checks = 0, failures = 0;

  initial begin
    bit sel;
    for (int i = 0; i < 1000; i++) begin
      sel = 1'($urandom_range(1));
      s1 = !sel; s2 = sel;
      av = 1'($urandom_range(1)); bv = 1'($urandom_range(1)); orr = 1'($urandom_range(1));
      ad = 12'($urandom); bd = 12'($urandom);
      #1;
      checks++;
      if (ov != (sel ? bv : av) || (ov && od != (sel ? bd : ad)) ||
          ar != (!sel && orr) || br != (sel && orr) || xf != (ov && orr)) begin
        failures++;
        if (failures < 5) $display("FAIL: sel=%b av=%b bv=%b ov=%b od=%h", sel, av, bv, ov, od);
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
