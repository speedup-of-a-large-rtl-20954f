// hs_reg: one NCL register stage with its completion logic, rendered as a
// clocked handshake register.
//
// In the NCL original a register passes a DATA wavefront, then must see a
// NULL wavefront before it can take the next DATA; its completion output Ko
// requests the next wavefront and its Ki input is the request from the stage
// after it. Here a DATA wavefront is a token (valid/data), Ko is in_ready and
// Ki is out_ready. The register is a half buffer: it holds at most one token
// and accepts a new one only when empty, so the cycle in which it empties
// stands for the NULL wavefront. in_ready depends only on the register's own
// state, never combinationally on out_ready, which keeps rings of these
// registers (the feedback loops) free of combinational paths.
//
// INIT_FULL makes the register come out of reset holding INIT_DATA (an NCL
// register reset to DATA instead of NULL). Latency: one clock from in to out.
module hs_reg #(
  parameter int unsigned    W         = 8,
  parameter bit             INIT_FULL = 1'b0,
  parameter logic [W-1:0]   INIT_DATA = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,   // Ko
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,  // Ki
  output logic [W-1:0] out_data
);

  logic         full;
  logic [W-1:0] data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= INIT_FULL;
      data <= INIT_DATA;
    end else if (full) begin
      if (out_ready) full <= 1'b0;
    end else if (in_valid) begin
      full <= 1'b1;
      data <= in_data;
    end
  end

  assign in_ready  = !full;
  assign out_valid = full;
  assign out_data  = data;

  // A token offered downstream stays put until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
