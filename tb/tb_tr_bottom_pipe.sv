// tb_tr_bottom_pipe: self-checking test of the bottom pipeline. In 4x4 and
// Hadamard mode B1 must carry the 4-point transform of the line; in 8x8 mode
// the line is d1, d3, d5, d7 and phase k must carry B1 = a(7-2k) and
// B2 = a(1+2k), the odd values of the standard's 8-point transform. Lines
// come back to back and with gaps; phases, tags and the 9-clock latency
// are checked too.
module tb_tr_bottom_pipe;
  import avc_itrans_pkg::*;

  localparam int NL = 80;
  localparam int LAT = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DW-1:0] in_data = '0;
  line_t in_tag = '0;
  logic out_valid;
  logic [1:0] out_k;
  line_t out_tag;
  logic signed [DW-1:0] out_b1, out_b2;

  tr_bottom_pipe dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef logic signed [DW-1:0] s_t;
  s_t e1x [NL][4];
  s_t e2x [NL][4];
  int t0 [NL];
  tmode_e lm [NL];
  int n8 = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int l = 0; l < NL; l++) begin
      s_t d [4];
      lm[l] = tmode_e'($urandom_range(0, 2));
      for (int n = 0; n < 4; n++) d[n] = s_t'($signed($urandom_range(0, 40000)) - 20000);
      if (lm[l] == MODE_8X8) begin
        s_t d1, d3, d5, d7, a1, a3, a5, a7;
        n8++;
        d1 = d[0]; d3 = d[1]; d5 = d[2]; d7 = d[3];
        a1 = -d3 + d5 - d7 - (d7 >>> 1);
        a3 = d1 + d7 - d3 - (d3 >>> 1);
        a5 = -d1 + d7 + d5 + (d5 >>> 1);
        a7 = d3 + d5 + d1 + (d1 >>> 1);
        e1x[l] = '{a7, a5, a3, a1};
        e2x[l] = '{a1, a3, a5, a7};
      end else begin
        s_t e0, e1, e2, e3;
        bit had;
        had = (lm[l] == MODE_HAD);
        e0 = d[0] + d[2]; e1 = d[0] - d[2];
        e2 = had ? d[1] - d[3] : (d[1] >>> 1) - d[3];
        e3 = had ? d[1] + d[3] : d[1] + (d[3] >>> 1);
        e1x[l] = '{e0 + e3, e1 + e2, e1 - e2, e0 - e3};
        e2x[l] = '{0, 0, 0, 0};
      end
      if ($urandom_range(0, 3) == 0) begin in_valid = 1'b0; @(negedge clk); end
      for (int k = 0; k < 4; k++) begin
        in_valid = 1'b1;
        in_data  = d[k];
        in_tag   = '{mode: lm[l], blk: 2'(l), line: 3'(l), pg: 1'b0, tp: 1'b0, last: 1'b0};
        if (k == 0) t0[l] = cyc;
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (ol != NL || n8 == 0) begin failures++; $display("%0d of %0d lines out", ol, NL); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ol = 0, ok = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (out_b1 !== e1x[ol][ok] || (lm[ol] == MODE_8X8 && out_b2 !== e2x[ol][ok]) ||
          out_k != 2'(ok) || out_tag.line != 3'(ol) || (ok == 0 && cyc - t0[ol] != LAT)) begin
        failures++;
        $display("line %0d mode %0d k %0d: got %0d %0d expected %0d %0d (latency %0d)", ol,
                 lm[ol], ok, out_b1, out_b2, e1x[ol][ok], e2x[ol][ok], cyc - t0[ol]);
      end
      if (ok == 3) begin ok = 0; ol++; end else ok++;
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
