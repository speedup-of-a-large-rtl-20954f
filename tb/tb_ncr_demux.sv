// tb_ncr_demux: checks the NCR demultiplexer. A plain instance must route
// each input to the selected output, take ready from that output only and
// flag the transfer. An instance with INIT_DATA0 must first offer an
// all-zero token on output A while refusing input, and behave like the
// plain one once that token has been taken.
module tb_ncr_demux;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic s1 = 1'b1, s2 = 1'b0, iv = 1'b0, ar = 1'b0, br = 1'b0;
  logic [15:0] id = '0;
  logic ir, av, bv, xf, ir0, av0, bv0, xf0;
  logic [15:0] ad, bd, ad0, bd0;

  ncr_demux #(.W(16), .INIT_DATA0(1'b0)) dut (.clk, .rst_n, .s1, .s2,
    .in_valid(iv), .in_ready(ir), .in_data(id), .a_valid(av), .a_ready(ar), .a_data(ad),
    .b_valid(bv), .b_ready(br), .b_data(bd), .xfer(xf));
  ncr_demux #(.W(16), .INIT_DATA0(1'b1)) dut0 (.clk, .rst_n, .s1, .s2,
    .in_valid(iv), .in_ready(ir0), .in_data(id), .a_valid(av0), .a_ready(ar), .a_data(ad0),
    .b_valid(bv0), .b_ready(br), .b_data(bd0), .xfer(xf0));

  int checks = 0, failures = 0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit sel;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    // reset token
    iv = 1'b1; id = 16'hBEEF; ar = 1'b0; br = 1'b1;
    #1;
    chk(av0 && ad0 == 16'h0 && !bv0 && !ir0 && !xf0, "DATA0 token offered on A, input refused");
    ar = 1'b1; #1;
    chk(!ir0, "input refused while DATA0 token is taken");
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      sel = 1'($urandom_range(1));
      s1 = !sel; s2 = sel;
      iv = 1'($urandom_range(1)); id = 16'($urandom);
      ar = 1'($urandom_range(1)); br = 1'($urandom_range(1));
      #1;
      chk(av == (iv && !sel) && bv == (iv && sel), "routing of valid");
      chk((!av || ad == id) && (!bv || bd == id), "routing of data");
      chk(ir == (sel ? br : ar) && xf == (iv && ir), "ready and transfer");
      chk(av0 == av && bv0 == bv && ir0 == ir && xf0 == xf, "INIT_DATA0 instance after its token");
      @(negedge clk);
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
