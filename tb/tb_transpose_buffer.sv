// tb_transpose_buffer: self-checking test of the transposition memory. Whole
// pages are written two samples per clock in row order, using the row-pass
// output addresses of the shared address function for 4x4 and 8x8 lines, and
// read back two per clock with the column-pass read addresses. What comes
// out must be the transposed block: the top pipeline gets the even rows
// (8x8) or the left column of a pair (4x4) of each column line.
module tb_transpose_buffer;
  import avc_itrans_pkg::*;

  logic clk = 1'b0;
  logic [1:0] we = '0;
  logic [1:0][6:0] waddr = '0;
  logic signed [1:0][DW-1:0] wdata = '0;
  logic [1:0][6:0] raddr = '0;
  logic signed [1:0][DW-1:0] rdata;

  transpose_buffer dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // sample value encodes its position: page, row, column, block
  function automatic logic signed [DW-1:0] val(int pg, int blk, int r, int c);
    return DW'(pg * 4096 + blk * 256 + r * 16 + c);
  endfunction

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      tmode_e m;
      int pg;
      m  = (rep % 2 == 0) ? MODE_8X8 : MODE_4X4;
      pg = rep % 2;
      // row pass writes
      for (int c = 0; c < 32; c++) begin
        line_t t;
        logic [11:0] a;
        t = '{mode: m, blk: 2'(c >> 3), line: (m == MODE_8X8) ? 3'(c >> 2) : 3'((c >> 2) & 1),
              pg: 1'b0, tp: 1'(pg), last: 1'b0};
        a = pair_addr(t, 2'(c & 3), 1'b0, 1'b0);
        we = 2'b11;
        waddr[0] = {1'(pg), a[11:6]};
        waddr[1] = {1'(pg), a[5:0]};
        if (m == MODE_8X8) begin
          wdata[0] = val(pg, 0, int'(a[11:9]), int'(a[8:6]));
          wdata[1] = val(pg, 0, int'(a[5:3]),  int'(a[2:0]));
        end else begin
          wdata[0] = val(pg, int'(a[11:10]), int'(a[9:8]), int'(a[7:6]));
          wdata[1] = val(pg, int'(a[5:4]),   int'(a[3:2]), int'(a[1:0]));
        end
        @(negedge clk);
      end
      we = 2'b00;
      // column pass reads
      for (int c = 0; c < 32; c++) begin
        line_t t;
        logic [11:0] a;
        int l, k;
        logic signed [DW-1:0] e0, e1;
        l = c >> 2; k = c & 3;
        t = '{mode: m, blk: 2'(c >> 3), line: (m == MODE_8X8) ? 3'(l) : 3'(l & 1),
              pg: 1'b0, tp: 1'(pg), last: 1'b0};
        a = pair_addr(t, 2'(k), 1'b1, 1'b1);
        raddr[0] = {1'(pg), a[11:6]};
        raddr[1] = {1'(pg), a[5:0]};
        if (m == MODE_8X8) begin
          // column l, rows 2k and 2k+1
          e0 = val(pg, 0, 2 * k, l);
          e1 = val(pg, 0, 2 * k + 1, l);
        end else begin
          // block c>>3, columns 2(l&1) and 2(l&1)+1, row k
          e0 = val(pg, c >> 3, k, 2 * (l & 1));
          e1 = val(pg, c >> 3, k, 2 * (l & 1) + 1);
        end
        @(posedge clk);
        #1;
        checks++;
        if (rdata[0] !== e0 || rdata[1] !== e1) begin
          failures++;
          $display("mode %0d step %0d: got %0h %0h expected %0h %0h", m, c, rdata[0], rdata[1], e0, e1);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
