// avc_itrans_pkg: types, widths and constant tables shared by the
// reconfigurable H.264/AVC inverse transform.
//
// The engine runs three kinds of job: 4x4 integer transform (four 4x4
// blocks per job), 4x4 Hadamard transform of DC coefficients (one block),
// and 8x8 integer transform (one block). Every job occupies one 64-entry
// page of the input and transposition memories, addressed in raster order
// (4x4: block*16 + row*4 + col, 8x8: row*8 + col).
//
// The norm-adjust tables are the ones defined by the H.264/AVC standard
// (normAdjust4x4 and normAdjust8x8); the document says only that they are
// "defined by AVC standard" and indexed by qp_rem. The data widths are this
// design's choice: the document gives none.
package avc_itrans_pkg;

  // Width of a coefficient as stored in the input memory.
  localparam int unsigned COEF_W = 16;
  // Width of samples inside the transform datapath.
  localparam int unsigned DW = 20;
  // Width of a weight-scale entry (W in the scaling formula).
  localparam int unsigned WS_W = 8;
  // Width of a norm-adjust entry (N in the scaling formula).
  localparam int unsigned NA_W = 6;

  typedef enum logic [1:0] {
    MODE_4X4 = 2'd0,
    MODE_HAD = 2'd1,
    MODE_8X8 = 2'd2
  } tmode_e;

  // Description of one line (4 samples per pipe) travelling through a
  // 1-D transform stage. For 4x4 and Hadamard jobs 'blk' is the 4x4 block
  // and 'line' selects the pair of rows (horizontal) or columns (vertical)
  // {2*line, 2*line+1}; for 8x8 jobs 'line' is the row or column itself.
  typedef struct packed {
    tmode_e     mode;
    logic [1:0] blk;
    logic [2:0] line;
    logic       pg;    // input memory page of the job
    logic       tp;    // transposition memory page of the job
    logic       last;  // last line of the job
  } line_t;

  // One pair of samples leaving a 1-D stage (outputs A' and B').
  typedef struct packed {
    line_t      tag;
    logic [1:0] k;     // phase 0..3 within the line
  } pair_t;

  // Raster addresses (within a 64-entry page) of the two samples a 1-D
  // stage reads (rd = 1) or produces (rd = 0) for phase k of a line.
  // 'vert' selects the vertical pass, whose addresses are the horizontal
  // ones with row and column bits exchanged: this exchange is the whole
  // transposition.
  //   read,  4x4: top  (row 2l,   col k)  bottom (row 2l+1, col k)
  //   read,  8x8: top  (row l,  col 2k)   bottom (row l,  col 2k+1)
  //   write, 4x4: A'   (row 2l,   col k)  B'     (row 2l+1, col k)
  //   write, 8x8: A'   (row l,    col k)  B'     (row l,    col 7-k)
  function automatic logic [11:0] pair_addr(line_t t, logic [1:0] k,
                                            logic rd, logic vert);
    logic [2:0] ra, ca, rb, cb;
    logic [5:0] aa, ab;
    if (t.mode == MODE_8X8) begin
      ra = t.line;
      rb = t.line;
      ca = rd ? {k, 1'b0} : {1'b0, k};
      cb = rd ? {k, 1'b1} : (3'd7 - {1'b0, k});
      aa = vert ? {ca, ra} : {ra, ca};
      ab = vert ? {cb, rb} : {rb, cb};
    end else begin
      ra = {1'b0, t.line[0], 1'b0};
      rb = {1'b0, t.line[0], 1'b1};
      ca = {1'b0, k};
      cb = {1'b0, k};
      aa = vert ? {t.blk, ca[1:0], ra[1:0]} : {t.blk, ra[1:0], ca[1:0]};
      ab = vert ? {t.blk, cb[1:0], rb[1:0]} : {t.blk, rb[1:0], cb[1:0]};
    end
    return {aa, ab};
  endfunction

  // qp / 6 and qp % 6 for qp in 0..63.
  function automatic logic [3:0] qp_div6(logic [5:0] qp);
    return 4'(qp / 6);
  endfunction
  function automatic logic [2:0] qp_mod6(logic [5:0] qp);
    return 3'(qp % 6);
  endfunction

  // Norm-adjust value N(qp_rem, i, j) of the H.264/AVC standard.
  function automatic logic [NA_W-1:0] norm_adjust(logic is8, logic [2:0] rem,
                                                  logic [2:0] i, logic [2:0] j);
    logic [NA_W-1:0] v4 [6][3];
    logic [NA_W-1:0] v8 [6][6];
    int cls;
    v4 = '{'{6'd10, 6'd16, 6'd13}, '{6'd11, 6'd18, 6'd14}, '{6'd13, 6'd20, 6'd16},
           '{6'd14, 6'd23, 6'd18}, '{6'd16, 6'd25, 6'd20}, '{6'd18, 6'd29, 6'd23}};
    v8 = '{'{6'd20, 6'd18, 6'd32, 6'd19, 6'd25, 6'd24},
           '{6'd22, 6'd19, 6'd35, 6'd21, 6'd28, 6'd26},
           '{6'd26, 6'd23, 6'd42, 6'd24, 6'd33, 6'd31},
           '{6'd28, 6'd25, 6'd45, 6'd26, 6'd35, 6'd33},
           '{6'd32, 6'd28, 6'd51, 6'd30, 6'd40, 6'd38},
           '{6'd36, 6'd32, 6'd58, 6'd34, 6'd46, 6'd43}};
    if (rem > 3'd5) rem = 3'd5;
    if (!is8) begin
      if (!i[0] && !j[0])     cls = 0;
      else if (i[0] && j[0])  cls = 1;
      else                    cls = 2;
      return v4[rem][cls];
    end
    if (i[1:0] == 2'd0 && j[1:0] == 2'd0)                  cls = 0;
    else if (i[0] && j[0])                                 cls = 1;
    else if (i[1:0] == 2'd2 && j[1:0] == 2'd2)             cls = 2;
    else if ((i[1:0] == 2'd0 && j[0]) || (i[0] && j[1:0] == 2'd0)) cls = 3;
    else if ((i[1:0] == 2'd0 && j[1:0] == 2'd2) ||
             (i[1:0] == 2'd2 && j[1:0] == 2'd0))           cls = 4;
    else                                                   cls = 5;
    return v8[rem][cls];
  endfunction

endpackage
