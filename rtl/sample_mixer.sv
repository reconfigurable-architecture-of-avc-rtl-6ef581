// sample_mixer: last stage of a 1-D transform pass. In 8x8 mode it finishes
// the 8-point inverse transform from the even result A = b0, b2, b4, b6 (top
// pipeline) and the odd pairs B1/B2 (bottom pipeline):
//   bo = B1 -/+ (B2 >> 2)        -> b7, -b5, b3, b1 for phases k = 0..3
//   A' = A + s*bo, B' = A - s*bo (s = -1 in phase 1, else +1)
// so that phase k yields x_k on A' and x_(7-k) on B'. In 4x4 and Hadamard
// mode it is transparent: A' = A and B' = B1, with the same latency.
//
// The document's drawing is followed: A passes two registers, the B path
// has a register, the ">> 2" and a second register, then one add/subtract
// forms the odd value and two more form the crossed outputs. Its input
// multiplexers are not needed here because the bottom pipeline already
// presents B1/B2 in the order the mixer uses; the sign pattern per phase
// is this design's consequence of that order.
//
// Interface: inputs are sampled on in_valid; outputs follow 3 clocks later
// with in_k and in_tag delayed alongside.
module sample_mixer
  import avc_itrans_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [1:0]           in_k,
  input  line_t                in_tag,
  input  logic signed [DW-1:0] in_a,
  input  logic signed [DW-1:0] in_b1,
  input  logic signed [DW-1:0] in_b2,
  output logic                 out_valid,
  output logic [1:0]           out_k,
  output line_t                out_tag,
  output logic signed [DW-1:0] out_a,
  output logic signed [DW-1:0] out_b
);

  logic                 v1, v2;
  logic [1:0]           k1, k2;
  line_t                t1, t2;
  logic signed [DW-1:0] a1, a2, x1, x2, y1, y2;
  logic signed [DW-1:0] bo;
  logic                 mix;

  assign mix = (t2.mode == MODE_8X8);

  always_comb begin
    bo = k2[1] ? x2 + y2 : x2 - y2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1 <= in_valid; v2 <= v1; out_valid <= v2;
    end
  end

  always_ff @(posedge clk) begin
    a1 <= in_a;  x1 <= in_b1;  y1 <= in_b2;  k1 <= in_k;  t1 <= in_tag;
    a2 <= a1;    x2 <= x1;     y2 <= y1 >>> 2; k2 <= k1;  t2 <= t1;
    out_k   <= k2;
    out_tag <= t2;
    if (!mix) begin
      out_a <= a2;
      out_b <= x2;
    end else if (k2 == 2'd1) begin
      out_a <= a2 - bo;
      out_b <= a2 + bo;
    end else begin
      out_a <= a2 + bo;
      out_b <= a2 - bo;
    end
  end

endmodule
