// avc_itrans_top: reconfigurable H.264/AVC inverse transform with inverse
// quantization. One engine performs the 4x4 integer transform, the 4x4
// Hadamard transform of DC coefficients and the 8x8 integer transform, at a
// steady two samples per clock, by reconfiguring two 1-D pipelines.
//
// Data flow (one job = one 64-entry page):
//   coef_buffer --2/clk--> 2 x iq_unit --> itrans_1d (rows) --> transpose_buffer
//   --> itrans_1d (columns) --> rounding (x + 32) >> 6 --> out_*
// A Hadamard job skips the scaling (iq_unit transparent), keeps full
// precision in both passes and writes its 16 results back into the page of
// coef_buffer it was read from instead of to out_*.
//
// Jobs: a 4x4 job transforms four 4x4 blocks (page address blk*16+row*4+col),
// an 8x8 job one 8x8 block (row*8+col), a Hadamard job one 4x4 block of DC
// values (row*4+col). Each job is read in 32 clocks (Hadamard: 8).
//
// Control, the "management unit": a sequencer reads a page two samples per
// clock; every sample travels with a small tag (mode, block, line, pages)
// from which all later addresses are derived. The transposition page of a
// job is reused as soon as the column pass of the job two places earlier is
// close enough to its end that no unread sample can be overwritten, so jobs
// follow each other with no wait states.
//
// Interface:
//   h_*      host port of the input memory, {page, address}, two writes and
//            one read per clock; write a page only while page_busy is low.
//   start_*  valid/ready handshake starting a job on start_page.
//   ws_*     weight-scale RAM write (see iq_unit); both scaling units get it.
//   out_*    two residual samples per clock with their page-relative raster
//            addresses; out_last marks the job's last pair.
//   job_done pulses when a job has left the engine (Hadamard: when its
//            results are back in coef_buffer).
// Latency from the first coefficient read to the first residual: 40 clocks
// for a 4x4 job (the column pass starts once the first 4x4 block of row
// results is written) and 64 clocks for an 8x8 job (it needs all 8 rows).
// Rate: two residuals per clock; jobs follow each other without wait states
// (a job right after a short Hadamard job may wait for its transposition page).
//
// The document describes the datapath blocks, their modes and the rate; it
// does not describe this control, the paging, the host ports or the final
// rounding, which are this design's own (the rounding is the standard's).
module avc_itrans_top
  import avc_itrans_pkg::*;
#(
  parameter int unsigned RES_W = DW - 6
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // host access to the input memory
  input  logic [1:0]                  h_we,
  input  logic [1:0][6:0]             h_waddr,
  input  logic signed [1:0][COEF_W-1:0] h_wdata,
  input  logic [6:0]                  h_raddr,
  output logic signed [COEF_W-1:0]    h_rdata,
  // weight-scale RAM
  input  logic                        ws_we,
  input  logic                        ws_is8,
  input  logic [5:0]                  ws_addr,
  input  logic [WS_W-1:0]             ws_data,
  // job start
  input  logic                        start_valid,
  output logic                        start_ready,
  input  logic                        start_page,
  input  tmode_e                      start_mode,
  input  logic [5:0]                  start_qp,
  // results
  output logic                        out_valid,
  output logic                        out_page,
  output logic                        out_last,
  output logic [5:0]                  out_addr_a,
  output logic [5:0]                  out_addr_b,
  output logic signed [RES_W-1:0]     out_a,
  output logic signed [RES_W-1:0]     out_b,
  // status
  output logic [1:0]                  page_busy,
  output logic                        job_done,
  output logic                        job_done_page
);

  // A transposition page may be handed to a new job when the column pass
  // still reading it has at most this many read clocks left (the current
  // clock included). A job accepted in clock L reads its first coefficients
  // in L+1 and writes its first row results in clock L+19 (1 memory read, 5
  // scaling, 12 row pass), so with at most 19 read clocks left the last read
  // happens in L+18, before any write.
  localparam int unsigned REUSE_REM = 19;

  typedef enum logic [1:0] { TP_FREE, TP_FILL, TP_READ } tp_state_e;

  // ---------------------------------------------------------------- sequencer
  logic       seq_busy;
  logic [4:0] seq_cnt;
  tmode_e     seq_mode;
  logic [5:0] seq_qp;
  logic       seq_pg, seq_tp, seq_last, tp_next, accept;
  line_t      seq_tag;
  logic [11:0] seq_addr;

  tp_state_e  tp_state [2];
  logic [1:0] tp_ready;
  tmode_e     tp_mode [2];
  logic [1:0] tp_pg;

  logic       vr_busy, vr_cur, vr_next, vr_last, vr_start;
  logic [4:0] vr_cnt;
  tmode_e     vr_mode;
  logic       vr_pg;
  logic [5:0] vr_rem;

  function automatic logic [4:0] job_len(tmode_e m);
    return (m == MODE_HAD) ? 5'd7 : 5'd31;
  endfunction

  function automatic line_t make_tag(tmode_e m, logic [4:0] c, logic pg, logic tp, logic last);
    line_t t;
    t.mode = m;
    t.pg   = pg;
    t.tp   = tp;
    t.last = last;
    if (m == MODE_8X8) begin
      t.blk  = 2'd0;
      t.line = c[4:2];
    end else begin
      t.blk  = c[4:3];
      t.line = {2'b00, c[2]};
    end
    return t;
  endfunction

  function automatic logic tp_ok(tp_state_e s, logic [5:0] rem);
    return s == TP_FREE || (s == TP_READ && rem <= 6'(REUSE_REM));
  endfunction

  assign seq_last    = seq_busy && seq_cnt == job_len(seq_mode);
  assign start_ready = (!seq_busy || seq_last) && tp_ok(tp_state[tp_next], vr_rem)
                       && !page_busy[start_page];
  assign accept      = start_valid && start_ready;
  assign seq_tag     = make_tag(seq_mode, seq_cnt, seq_pg, seq_tp, seq_last);
  assign seq_addr    = pair_addr(seq_tag, seq_cnt[1:0], 1'b1, 1'b0);

  // ------------------------------------------------------------ input memory
  logic [1:0]                    fb_we;
  logic [1:0][6:0]               fb_addr;
  logic signed [1:0][COEF_W-1:0] fb_data;
  logic signed [1:0][COEF_W-1:0] cb_rdata;

  coef_buffer u_coef (
    .clk,
    .h_we, .h_waddr, .h_wdata, .h_raddr, .h_rdata,
    .fb_we, .fb_addr, .fb_data,
    .rd_addr({{seq_pg, seq_addr[5:0]}, {seq_pg, seq_addr[11:6]}}),
    .rd_data(cb_rdata)
  );

  // stage after the memory read
  logic       r_valid;
  line_t      r_tag;
  logic [5:0] r_qp;
  logic [11:0] r_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r_valid <= 1'b0;
    else        r_valid <= seq_busy;
  end
  always_ff @(posedge clk) begin
    r_tag  <= seq_tag;
    r_qp   <= seq_qp;
    r_addr <= seq_addr;
  end

  // row and column of a raster address within its block
  function automatic logic [5:0] pos_ij(tmode_e m, logic [5:0] a);
    return (m == MODE_8X8) ? a : {1'b0, a[3:2], 1'b0, a[1:0]};
  endfunction

  // --------------------------------------------------- inverse quantization
  logic [1:0]                iq_valid;
  logic signed [1:0][DW-1:0] iq_data;
  line_t                     iq_tag [2];
  logic [5:0]                ij_top, ij_bot;

  assign ij_top = pos_ij(r_tag.mode, r_addr[11:6]);
  assign ij_bot = pos_ij(r_tag.mode, r_addr[5:0]);

  iq_unit u_iq_top (
    .clk, .rst_n, .in_valid(r_valid), .in_coef(cb_rdata[0]),
    .in_i(ij_top[5:3]), .in_j(ij_top[2:0]), .in_mode(r_tag.mode), .in_qp(r_qp),
    .in_tag(r_tag), .ws_we, .ws_is8, .ws_addr, .ws_data,
    .out_valid(iq_valid[0]), .out_data(iq_data[0]), .out_tag(iq_tag[0])
  );

  iq_unit u_iq_bot (
    .clk, .rst_n, .in_valid(r_valid), .in_coef(cb_rdata[1]),
    .in_i(ij_bot[5:3]), .in_j(ij_bot[2:0]), .in_mode(r_tag.mode), .in_qp(r_qp),
    .in_tag(r_tag), .ws_we, .ws_is8, .ws_addr, .ws_data,
    .out_valid(iq_valid[1]), .out_data(iq_data[1]), .out_tag(iq_tag[1])
  );

  // ------------------------------------------------------------- row pass
  logic                 hp_valid;
  logic [1:0]           hp_k;
  line_t                hp_tag;
  logic signed [DW-1:0] hp_a, hp_b;
  logic [11:0]          hp_addr;

  itrans_1d u_rows (
    .clk, .rst_n, .in_valid(iq_valid[0]), .in_tag(iq_tag[0]),
    .in_top(iq_data[0]), .in_bot(iq_data[1]),
    .out_valid(hp_valid), .out_k(hp_k), .out_tag(hp_tag), .out_a(hp_a), .out_b(hp_b)
  );

  assign hp_addr = pair_addr(hp_tag, hp_k, 1'b0, 1'b0);

  // ------------------------------------------------------- transposition
  logic [11:0]                vr_addr;
  line_t                      vr_tag;
  logic signed [1:0][DW-1:0]  tb_rdata;

  assign vr_last  = vr_busy && vr_cnt == job_len(vr_mode);
  // A page is ready for the column pass when its first block of row results
  // is written: block 0 of a 4x4 job (the other blocks are written at the
  // rate the column pass reads them), the whole page for 8x8 and Hadamard.
  logic  hp_ready;
  assign hp_ready = hp_valid && hp_k == 2'd3 &&
                    ((hp_tag.mode == MODE_4X4) ? (hp_tag.blk == 2'd0 && hp_tag.line[0])
                                               : hp_tag.last);
  // the column pass may start in the clock after that row result is written
  assign vr_start = (!vr_busy || vr_last) &&
                    (tp_ready[vr_next] || (hp_ready && hp_tag.tp == vr_next));
  assign vr_tag   = make_tag(vr_mode, vr_cnt, vr_pg, vr_cur, vr_last);
  assign vr_addr  = pair_addr(vr_tag, vr_cnt[1:0], 1'b1, 1'b1);
  assign vr_rem   = vr_busy ? 6'(job_len(vr_mode) - vr_cnt) + 6'd1 : 6'd0;

  transpose_buffer u_tr (
    .clk,
    .we({hp_valid, hp_valid}),
    .waddr({{hp_tag.tp, hp_addr[5:0]}, {hp_tag.tp, hp_addr[11:6]}}),
    .wdata({hp_b, hp_a}),
    .raddr({{vr_cur, vr_addr[5:0]}, {vr_cur, vr_addr[11:6]}}),
    .rdata(tb_rdata)
  );

  logic  v_valid;
  line_t v_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_valid <= 1'b0;
    else        v_valid <= vr_busy;
  end
  always_ff @(posedge clk) v_tag <= vr_tag;

  // ---------------------------------------------------------- column pass
  logic                 vp_valid;
  logic [1:0]           vp_k;
  line_t                vp_tag;
  logic signed [DW-1:0] vp_a, vp_b;
  logic [11:0]          vp_addr;

  itrans_1d u_cols (
    .clk, .rst_n, .in_valid(v_valid), .in_tag(v_tag),
    .in_top(tb_rdata[0]), .in_bot(tb_rdata[1]),
    .out_valid(vp_valid), .out_k(vp_k), .out_tag(vp_tag), .out_a(vp_a), .out_b(vp_b)
  );

  assign vp_addr = pair_addr(vp_tag, vp_k, 1'b0, 1'b1);

  function automatic logic signed [COEF_W-1:0] sat_coef(logic signed [DW-1:0] x);
    localparam logic signed [DW-1:0] MAXV = DW'((1 << (COEF_W - 1)) - 1);
    localparam logic signed [DW-1:0] MINV = -DW'(1 << (COEF_W - 1));
    if (x > MAXV) return COEF_W'(MAXV);
    if (x < MINV) return COEF_W'(MINV);
    return COEF_W'(x);
  endfunction

  function automatic logic signed [RES_W-1:0] rnd6(logic signed [DW-1:0] x);
    logic signed [DW:0] y;
    y = ($signed({x[DW-1], x}) + (DW+1)'(32)) >>> 6;
    return RES_W'(y);
  endfunction

  logic vp_had, vp_end;
  assign vp_had = vp_valid && vp_tag.mode == MODE_HAD;
  assign vp_end = vp_valid && vp_tag.last && vp_k == 2'd3;

  // Hadamard feedback into the input memory
  assign fb_we   = {vp_had, vp_had};
  assign fb_addr = {{vp_tag.pg, vp_addr[5:0]}, {vp_tag.pg, vp_addr[11:6]}};
  assign fb_data = {sat_coef(vp_b), sat_coef(vp_a)};

  // ------------------------------------------------------------ outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      job_done  <= 1'b0;
    end else begin
      out_valid <= vp_valid && !vp_had;
      out_last  <= vp_end && !vp_had;
      job_done  <= vp_end;
    end
  end
  always_ff @(posedge clk) begin
    out_a         <= rnd6(vp_a);
    out_b         <= rnd6(vp_b);
    out_addr_a    <= vp_addr[11:6];
    out_addr_b    <= vp_addr[5:0];
    out_page      <= vp_tag.pg;
    job_done_page <= vp_tag.pg;
  end

  // -------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_busy  <= 1'b0;
      seq_cnt   <= '0;
      seq_mode  <= MODE_4X4;
      seq_qp    <= '0;
      seq_pg    <= 1'b0;
      seq_tp    <= 1'b0;
      tp_next   <= 1'b0;
      page_busy <= '0;
      tp_state  <= '{TP_FREE, TP_FREE};
      tp_ready   <= '0;
      tp_mode   <= '{MODE_4X4, MODE_4X4};
      tp_pg     <= '0;
      vr_busy   <= 1'b0;
      vr_cnt    <= '0;
      vr_cur    <= 1'b0;
      vr_next   <= 1'b0;
      vr_mode   <= MODE_4X4;
      vr_pg     <= 1'b0;
    end else begin
      // input sequencer
      if (seq_busy) seq_cnt <= seq_cnt + 5'd1;
      if (seq_last) begin
        seq_busy <= 1'b0;
        if (seq_mode != MODE_HAD) page_busy[seq_pg] <= 1'b0;
      end
      // Hadamard results written back: page free again
      if (vp_end && vp_tag.mode == MODE_HAD) page_busy[vp_tag.pg] <= 1'b0;

      // the page can be read by the column pass
      if (hp_ready) tp_ready[hp_tag.tp] <= 1'b1;

      // column pass reader
      if (vr_busy) vr_cnt <= vr_cnt + 5'd1;
      if (vr_last) begin
        vr_busy <= 1'b0;
        if (tp_state[vr_cur] == TP_READ) tp_state[vr_cur] <= TP_FREE;
      end
      if (vr_start) begin
        vr_busy           <= 1'b1;
        vr_cnt            <= '0;
        vr_cur            <= vr_next;
        vr_next           <= ~vr_next;
        vr_mode           <= tp_mode[vr_next];
        vr_pg             <= tp_pg[vr_next];
        tp_ready[vr_next]  <= 1'b0;
        tp_state[vr_next] <= TP_READ;
      end

      if (accept) begin
        seq_busy            <= 1'b1;
        seq_cnt             <= '0;
        seq_mode            <= start_mode;
        seq_qp              <= start_qp;
        seq_pg              <= start_page;
        seq_tp              <= tp_next;
        tp_next             <= ~tp_next;
        page_busy[start_page] <= 1'b1;
        tp_state[tp_next]   <= TP_FILL;
        tp_mode[tp_next]    <= start_mode;
        tp_pg[tp_next]      <= start_page;
      end
    end
  end

  a_mode_legal: assert property (@(posedge clk) disable iff (!rst_n)
    start_valid |-> start_mode inside {MODE_4X4, MODE_HAD, MODE_8X8});
  a_start_hold: assert property (@(posedge clk) disable iff (!rst_n)
    start_valid && !start_ready |=> start_valid);

endmodule
