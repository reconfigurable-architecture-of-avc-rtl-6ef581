// tr_top_pipe: the top transform pipeline, a serial 1-D 4-point inverse
// transform taking one sample per clock and producing one sample per clock.
//
// It computes the H.264/AVC 4-point inverse core transform
//   e0 = d0 + d2          e1 = d0 - d2
//   e2 = (d1 >> 1) - d3   e3 = d1 + (d3 >> 1)
//   x0 = e0 + e3  x1 = e1 + e2  x2 = e1 - e2  x3 = e0 - e3
// which is also the even half of the 8-point transform when it is fed the
// even coefficients c0, c2, c4, c6 (it then yields b0, b2, b4, b6). In
// Hadamard mode the two ">> 1" shifts are switched off.
//
// Following the document, the line is collected in shift registers, then a
// single adder/subtractor forms one first-stage sum per clock, with a
// ">> 1" multiplexer on each operand, into a small memory (M) that reorders
// the sums; a second adder/subtractor forms one output per clock and a
// register (T) drives output A. The exact schedule is this design's own.
//
// Interface: a line is 4 samples on 4 consecutive clocks with in_valid
// high (in_tag is taken with the 4th). 9 clocks after the first sample the
// line's outputs x0..x3 appear on 4 consecutive clocks with out_k = 0..3.
// Lines may follow each other without gaps.
module tr_top_pipe
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
  output logic signed [DW-1:0] out_a
);

  logic [1:0]           cnt;
  logic signed [DW-1:0] sr [3];
  logic signed [DW-1:0] h  [4];
  line_t                h_tag;
  logic                 load;

  logic                 a1;
  logic [1:0]           p1;
  logic signed [DW-1:0] m1 [3];
  logic signed [DW-1:0] e  [4];
  line_t                e_tag;
  logic                 a2;
  logic [1:0]           p2;

  logic signed [DW-1:0] opp, opq, sum1, sum2;
  logic                 had;

  assign load = in_valid && (cnt == 2'd3);
  assign had  = (h_tag.mode == MODE_HAD);

  // first stage: one sum per clock
  always_comb begin
    unique case (p1)
      2'd0: begin opp = h[0]; opq = h[2]; sum1 = opp + opq; end
      2'd1: begin opp = h[0]; opq = h[2]; sum1 = opp - opq; end
      2'd2: begin opp = had ? h[1] : (h[1] >>> 1); opq = h[3]; sum1 = opp - opq; end
      default: begin opp = h[1]; opq = had ? h[3] : (h[3] >>> 1); sum1 = opp + opq; end
    endcase
  end

  // second stage: one output per clock
  always_comb begin
    unique case (p2)
      2'd0:    sum2 = e[0] + e[3];
      2'd1:    sum2 = e[1] + e[2];
      2'd2:    sum2 = e[1] - e[2];
      default: sum2 = e[0] - e[3];
    endcase
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
      if (p1 != 2'd3) m1[p1] <= sum1;
      else begin
        e[0] <= m1[0]; e[1] <= m1[1]; e[2] <= m1[2]; e[3] <= sum1;
        e_tag <= h_tag;
      end
    end
    out_a   <= sum2;
    out_k   <= p2;
    out_tag <= e_tag;
  end

  // A line must arrive as 4 back-to-back samples.
  a_burst: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && cnt != 2'd3) |=> in_valid);

endmodule
