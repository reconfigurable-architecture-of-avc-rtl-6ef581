// itrans_1d: one 1-D inverse transform pass (used once for rows and once
// for columns). It joins the two reconfigurable pipelines and the sample
// mixer and takes and delivers two samples per clock.
//
//   4x4 / Hadamard: the top and the bottom pipeline each transform one
//                   4-point line; the mixer passes both results through.
//   8x8:            the top pipeline gets the even and the bottom pipeline
//                   the odd coefficients of one 8-point line; the mixer
//                   combines them into x_k (A') and x_(7-k) (B').
//
// Interface: a line is 4 clocks of in_valid with a sample for each pipe
// (in_top, in_bot) and the line's tag. The two results of phase k appear
// LAT = 12 clocks after the line's first input clock, on 4 consecutive
// clocks, with out_k = k. Lines may follow back to back.
module itrans_1d
  import avc_itrans_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  line_t                in_tag,
  input  logic signed [DW-1:0] in_top,
  input  logic signed [DW-1:0] in_bot,
  output logic                 out_valid,
  output logic [1:0]           out_k,
  output line_t                out_tag,
  output logic signed [DW-1:0] out_a,
  output logic signed [DW-1:0] out_b
);

  logic                 tv, bv;
  logic [1:0]           tk, bk;
  line_t                tt, bt;
  logic signed [DW-1:0] ta, b1, b2;

  tr_top_pipe u_top (
    .clk, .rst_n, .in_valid, .in_data(in_top), .in_tag,
    .out_valid(tv), .out_k(tk), .out_tag(tt), .out_a(ta)
  );

  tr_bottom_pipe u_bot (
    .clk, .rst_n, .in_valid, .in_data(in_bot), .in_tag,
    .out_valid(bv), .out_k(bk), .out_tag(bt), .out_b1(b1), .out_b2(b2)
  );

  sample_mixer u_mix (
    .clk, .rst_n, .in_valid(tv), .in_k(tk), .in_tag(tt),
    .in_a(ta), .in_b1(b1), .in_b2(b2),
    .out_valid, .out_k, .out_tag, .out_a, .out_b
  );

  // Both pipelines run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    tv == bv && (!tv || (tk == bk && tt == bt)));

endmodule
