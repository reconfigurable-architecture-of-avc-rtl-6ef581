// iq_unit: inverse quantization (scaling) of one transform coefficient per
// clock, for one of the two transform pipelines.
//
// It computes  y = ((f * W(i,j)) * N(qp_rem,i,j) * 2^qp_per) >>> QS  with
// QS = 4 for 4x4 blocks and 6 for 8x8 blocks, as three multiplications in a
// row: the weight scale W, the norm adjust N, and the variable shift, which
// is done as a multiplication by 2^qp_per followed by a constant shift on
// wires. This is the structure the document draws (registers on the inputs,
// a qp split into qp_per / qp_rem, a norm-adjust ROM indexed by qp_rem and
// the position, a weight-scale RAM written by the user, three multipliers).
// In Hadamard mode the block is transparent: the coefficient comes out
// unchanged with the same latency, as the document states.
//
// The weight-scale RAM holds one 4x4 and one 8x8 matrix. Until a matrix is
// written after reset its weights read as the flat default 16, the value the
// document gives for profiles without user matrices. Rounding: the document's
// shift has no rounding term and is followed here (arithmetic shift, i.e.
// floor); the result saturates to DW bits. Widths are this design's choice.
//
// Interface: in_* is sampled when in_valid is high; out_* follows LAT = 5
// clocks later with the tag carried alongside. ws_* writes one weight per
// clock (ws_is8 selects the matrix, ws_addr = row*4+col or row*8+col).
module iq_unit
  import avc_itrans_pkg::*;
#(
  parameter type tag_t = line_t
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [COEF_W-1:0] in_coef,
  input  logic [2:0]               in_i,     // row within the block
  input  logic [2:0]               in_j,     // column within the block
  input  tmode_e                   in_mode,
  input  logic [5:0]               in_qp,
  input  tag_t                     in_tag,
  input  logic                     ws_we,
  input  logic                     ws_is8,
  input  logic [5:0]               ws_addr,
  input  logic [WS_W-1:0]          ws_data,
  output logic                     out_valid,
  output logic signed [DW-1:0]     out_data,
  output tag_t                     out_tag
);

  localparam int unsigned P1_W = COEF_W + WS_W + 1;
  localparam int unsigned P2_W = P1_W + NA_W + 1;
  localparam int unsigned P3_W = P2_W + 9;

  // weight-scale RAM
  logic [WS_W-1:0] ws4 [16];
  logic [WS_W-1:0] ws8 [64];
  logic [1:0]      ws_user;

  always_ff @(posedge clk) begin
    if (ws_we && !ws_is8) ws4[ws_addr[3:0]] <= ws_data;
    if (ws_we &&  ws_is8) ws8[ws_addr]      <= ws_data;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ws_user <= '0;
    else if (ws_we) ws_user[ws_is8] <= 1'b1;
  end

  // stage 0: input registers
  logic                     v0;
  logic signed [COEF_W-1:0] f0;
  logic [2:0]               i0, j0;
  tmode_e                   m0;
  logic [5:0]               qp0;
  tag_t                     t0;

  // stage 1: qp split, ROM and RAM reads
  logic                     v1, byp1, is8_1;
  logic signed [COEF_W-1:0] f1;
  logic [WS_W-1:0]          w1;
  logic [NA_W-1:0]          n1;
  logic [3:0]               per1;
  tag_t                     t1;

  // stage 2: f * W
  logic                     v2, byp2, is8_2;
  logic signed [P1_W-1:0]   p2;
  logic signed [COEF_W-1:0] f2;
  logic [NA_W-1:0]          n2;
  logic [3:0]               per2;
  tag_t                     t2;

  // stage 3: * N
  logic                     v3, byp3, is8_3;
  logic signed [P2_W-1:0]   p3;
  logic signed [COEF_W-1:0] f3;
  logic [3:0]               per3;
  tag_t                     t3;

  // stage 4: * 2^qp_per, constant shift, saturation
  logic signed [P3_W-1:0]   p4;
  logic signed [P3_W-1:0]   sh4;

  always_comb begin
    p4  = P3_W'(p3) * $signed({1'b0, 9'(1) << per3});
    sh4 = is8_3 ? (p4 >>> 6) : (p4 >>> 4);
  end

  function automatic logic signed [DW-1:0] sat(logic signed [P3_W-1:0] x);
    localparam logic signed [P3_W-1:0] MAXV = P3_W'((1 << (DW - 1)) - 1);
    localparam logic signed [P3_W-1:0] MINV = -P3_W'(1 << (DW - 1));
    if (x > MAXV) return DW'(MAXV);
    if (x < MINV) return DW'(MINV);
    return DW'(x);
  endfunction

  logic [WS_W-1:0] w_rd;
  always_comb begin
    if (m0 == MODE_8X8) w_rd = ws_user[1] ? ws8[{i0, j0}] : WS_W'(16);
    else                w_rd = ws_user[0] ? ws4[{i0[1:0], j0[1:0]}] : WS_W'(16);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0; v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v0 <= in_valid; v1 <= v0; v2 <= v1; v3 <= v2; out_valid <= v3;
    end
  end

  always_ff @(posedge clk) begin
    // stage 0
    f0 <= in_coef; i0 <= in_i; j0 <= in_j; m0 <= in_mode; qp0 <= in_qp; t0 <= in_tag;
    // stage 1
    f1    <= f0;
    t1    <= t0;
    byp1  <= (m0 == MODE_HAD);
    is8_1 <= (m0 == MODE_8X8);
    per1  <= qp_div6(qp0);
    n1    <= norm_adjust(m0 == MODE_8X8, qp_mod6(qp0), i0, j0);
    w1    <= w_rd;
    // stage 2
    p2    <= P1_W'(f1) * $signed({1'b0, w1});
    f2    <= f1; n2 <= n1; per2 <= per1; byp2 <= byp1; is8_2 <= is8_1; t2 <= t1;
    // stage 3
    p3    <= P2_W'(p2) * $signed({1'b0, n2});
    f3    <= f2; per3 <= per2; byp3 <= byp2; is8_3 <= is8_2; t3 <= t2;
    // stage 4
    out_data <= byp3 ? DW'(f3) : sat(sh4);
    out_tag  <= t3;
  end

endmodule
