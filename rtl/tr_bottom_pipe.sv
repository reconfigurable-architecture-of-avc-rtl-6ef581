// tr_bottom_pipe: the bottom transform pipeline. In 4x4 and Hadamard mode it
// is a serial 1-D 4-point inverse transform identical in function to the top
// pipeline (result on output B1). In 8x8 mode it is fed the odd coefficients
// d1, d3, d5, d7 of an 8-point line and computes the odd intermediate values
// of the H.264/AVC 8-point inverse transform
//   a1 = (d5 - d3) - 1.5*d7      a3 = (d1 + d7) - 1.5*d3
//   a5 = (d7 - d1) + 1.5*d5      a7 = (d3 + d5) + 1.5*d1
// where 1.5*y = y + (y >> 1) is formed by the extra first-stage adder that
// is only used in 8x8 mode (the "multiplication by 1.5" of the document).
// Its second stage then drives two values per clock, B1 = a7, a5, a3, a1
// and B2 = a1, a3, a5, a7 for phases k = 0..3, which is the pairing the
// sample mixer needs to form b7, -b5, b3, b1.
//
// As in the document, the first stage has one shared adder (the 4-point
// sums, or the pair sum u of an odd value) plus the 8x8-only adder (v), each
// writing one result per clock into a small reorder memory; the second
// stage has two adders, one per output, followed by registers. The schedule
// and the order of B1/B2 are this design's own.
//
// Interface and timing are those of tr_top_pipe: lines of 4 back-to-back
// samples, outputs 9 clocks after a line's first sample, out_k = 0..3.
module tr_bottom_pipe
  import avc_itrans_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_data,
  input  line_t                in_tag,
  output logic                 out_valid,
  output logic [1:0]           out_k,
  output line_t                out_tag,
  output logic signed [DW-1:0] out_b1,
  output logic signed [DW-1:0] out_b2
);

  logic [1:0]           cnt;
  logic signed [DW-1:0] sr [3];
  logic signed [DW-1:0] h  [4];
  line_t                h_tag;
  logic                 load;

  logic                 a1;
  logic [1:0]           p1;
  logic signed [DW-1:0] mu [3];
  logic signed [DW-1:0] mv [3];
  logic signed [DW-1:0] u  [4];
  logic signed [DW-1:0] v  [4];
  line_t                u_tag;
  logic                 a2;
  logic [1:0]           p2;

  logic signed [DW-1:0] sum_u, sum_v, y15, s_b1, s_b2;
  logic                 had, odd1, odd2;

  assign load = in_valid && (cnt == 2'd3);
  assign had  = (h_tag.mode == MODE_HAD);
  assign odd1 = (h_tag.mode == MODE_8X8);
  assign odd2 = (u_tag.mode == MODE_8X8);

  // first stage: shared adder (u) and 8x8-only adder (v = 1.5 * y)
  always_comb begin
    unique case (p1)
      2'd0:    y15 = h[3];
      2'd1:    y15 = h[1];
      2'd2:    y15 = h[2];
      default: y15 = h[0];
    endcase
    sum_v = y15 + (y15 >>> 1);
    if (odd1) begin
      unique case (p1)
        2'd0:    sum_u = h[2] - h[1];
        2'd1:    sum_u = h[0] + h[3];
        2'd2:    sum_u = h[3] - h[0];
        default: sum_u = h[1] + h[2];
      endcase
    end else begin
      unique case (p1)
        2'd0:    sum_u = h[0] + h[2];
        2'd1:    sum_u = h[0] - h[2];
        2'd2:    sum_u = (had ? h[1] : (h[1] >>> 1)) - h[3];
        default: sum_u = h[1] + (had ? h[3] : (h[3] >>> 1));
      endcase
    end
  end

  // second stage: two adders
  function automatic logic signed [DW-1:0] odd_val(logic [1:0] n,
      logic signed [DW-1:0] un, logic signed [DW-1:0] vn);
    return n[1] ? un + vn : un - vn;
  endfunction

  always_comb begin
    if (odd2) begin
      s_b1 = odd_val(2'd3 - p2, u[2'd3 - p2], v[2'd3 - p2]);
      s_b2 = odd_val(p2, u[p2], v[p2]);
    end else begin
      unique case (p2)
        2'd0:    s_b1 = u[0] + u[3];
        2'd1:    s_b1 = u[1] + u[2];
        2'd2:    s_b1 = u[1] - u[2];
        default: s_b1 = u[0] - u[3];
      endcase
      s_b2 = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; a1 <= 1'b0; p1 <= '0; a2 <= 1'b0; p2 <= '0; out_valid <= 1'b0;
    end else begin
      if (in_valid) cnt <= cnt + 2'd1;
      a1 <= load || (a1 && p1 != 2'd3);
      p1 <= load ? 2'd0 : p1 + 2'd1;
      a2 <= (a1 && p1 == 2'd3) || (a2 && p2 != 2'd3);
      p2 <= (a1 && p1 == 2'd3) ? 2'd0 : p2 + 2'd1;
      out_valid <= a2;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      sr[0] <= sr[1]; sr[1] <= sr[2]; sr[2] <= in_data;
    end
    if (load) begin
      h[0] <= sr[0]; h[1] <= sr[1]; h[2] <= sr[2]; h[3] <= in_data;
      h_tag <= in_tag;
    end
    if (a1) begin
      if (p1 != 2'd3) begin
        mu[p1] <= sum_u;
        mv[p1] <= sum_v;
      end else begin
        u[0] <= mu[0]; u[1] <= mu[1]; u[2] <= mu[2]; u[3] <= sum_u;
        v[0] <= mv[0]; v[1] <= mv[1]; v[2] <= mv[2]; v[3] <= sum_v;
        u_tag <= h_tag;
      end
    end
    out_b1  <= s_b1;
    out_b2  <= s_b2;
    out_k   <= p2;
    out_tag <= u_tag;
  end

  a_burst: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && cnt != 2'd3) |=> in_valid);

endmodule
