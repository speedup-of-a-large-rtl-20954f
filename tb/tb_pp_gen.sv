// tb_pp_gen: for random operands in every mode (plus the extreme values),
// the 33 partial-product rows must add up, modulo 2^71, to the integer
// product X*Y, and the multiply sign must equal the sign of the operands'
// product as seen by the mode (signed X for SS/SU, signed Y for SS).
module tb_pp_gen;
  import mac_pkg::*;
  logic [31:0] x, y;
  sign_mode_e  mode;
  logic [NROWS-1:0][SW-1:0] rows;
  logic msign;

  pp_gen dut (.x, .y, .mode, .rows, .msign);

  int checks = 0, failures = 0;

  task automatic one(input logic [31:0] xa, ya, input logic [1:0] m);
    logic signed [127:0] xv, yv, p;
    logic [SW-1:0] sum;
    x = xa; y = ya; mode = sign_mode_e'(m);
    #1;
    xv = (m == 2'd0 || m == 2'd1) ? 128'($signed(xa)) : {96'd0, xa};
    yv = (m == 2'd0) ? 128'($signed(ya)) : {96'd0, ya};
    p = xv * yv;
    sum = '0;
    for (int j = 0; j < NROWS; j++) sum += rows[j];
    checks++;
    if (sum !== p[SW-1:0] || msign !== ((xv < 0) ^ (yv < 0))) begin
      failures++;
      if (failures < 5) $display("FAIL: x=%h y=%h m=%0d sum=%h exp=%h msign=%b", xa, ya, m, sum, p[SW-1:0], msign);
    end
    #9;
  endtask

  initial begin
    logic [31:0] corner [4] = '{32'h0, 32'hFFFFFFFF, 32'h80000000, 32'h7FFFFFFF};
    for (int m = 0; m < 4; m++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) one(corner[i], corner[j], 2'(m));
    for (int i = 0; i < 3000; i++) one($urandom, $urandom, 2'($urandom_range(3)));
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
