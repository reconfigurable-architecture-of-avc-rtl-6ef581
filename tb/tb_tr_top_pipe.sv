// tb_tr_top_pipe: self-checking test of the top pipeline. Random 4-sample
// lines in 4x4, Hadamard and 8x8 mode (where the line is the even half
// c0, c2, c4, c6 of an 8-point line and the results are b0, b2, b4, b6) are
// fed back to back and with gaps; outputs, phases, tags and the 9-clock
// latency are checked against the standard's 4-point butterfly.
module tb_tr_top_pipe;
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
  logic signed [DW-1:0] out_a;

  tr_top_pipe dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef logic signed [DW-1:0] s_t;
  s_t exp_x [NL][4];
  int t0 [NL];
  tmode_e lm [NL];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int l = 0; l < NL; l++) begin
      s_t d [4];
      s_t e0, e1, e2, e3;
      bit had;
      lm[l] = tmode_e'($urandom_range(0, 2));
      had = (lm[l] == MODE_HAD);
      for (int n = 0; n < 4; n++) d[n] = s_t'($signed($urandom_range(0, 40000)) - 20000);
      e0 = d[0] + d[2]; e1 = d[0] - d[2];
      e2 = had ? d[1] - d[3] : (d[1] >>> 1) - d[3];
      e3 = had ? d[1] + d[3] : d[1] + (d[3] >>> 1);
      exp_x[l] = '{e0 + e3, e1 + e2, e1 - e2, e0 - e3};
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
    if (ol != NL) begin failures++; $display("%0d of %0d lines out", ol, NL); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ol = 0, ok = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (out_a !== exp_x[ol][ok] || out_k != 2'(ok) || out_tag.line != 3'(ol) ||
          out_tag.mode != lm[ol] || (ok == 0 && cyc - t0[ol] != LAT)) begin
        failures++;
        $display("line %0d k %0d: got %0d expected %0d (latency %0d)", ol, ok, out_a,
                 exp_x[ol][ok], cyc - t0[ol]);
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
