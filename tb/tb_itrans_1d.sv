// tb_itrans_1d: self-checking test of one 1-D transform pass. It streams
// random lines back to back in 4x4, Hadamard and 8x8 mode, computes the
// expected H.264/AVC 1-D results with the standard's butterfly equations,
// and checks every output pair, its phase, its tag and the 12-clock latency.
module tb_itrans_1d;
  import avc_itrans_pkg::*;

  localparam int NLINES = 60;
  localparam int LAT = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  line_t in_tag;
  logic signed [DW-1:0] in_top, in_bot;
  logic out_valid;
  logic [1:0] out_k;
  line_t out_tag;
  logic signed [DW-1:0] out_a, out_b;
  int checks = 0, failures = 0;
  int cyc = 0;

  itrans_1d dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef logic signed [DW-1:0] s_t;
  s_t  din  [NLINES][8];
  s_t  dexp [NLINES][8];
  tmode_e lmode [NLINES];
  int  lstart [NLINES];

  function automatic void ref4(input s_t d[4], input bit had, output s_t x[4]);
    s_t e0, e1, e2, e3;
    e0 = d[0] + d[2];
    e1 = d[0] - d[2];
    e2 = had ? d[1] - d[3] : (d[1] >>> 1) - d[3];
    e3 = had ? d[1] + d[3] : d[1] + (d[3] >>> 1);
    x[0] = e0 + e3; x[1] = e1 + e2; x[2] = e1 - e2; x[3] = e0 - e3;
  endfunction

  function automatic void ref8(input s_t d[8], output s_t x[8]);
    s_t a0, a1, a2, a3, a4, a5, a6, a7, b0, b1, b2, b3, b4, b5, b6, b7;
    a0 = d[0] + d[4];
    a4 = d[0] - d[4];
    a2 = (d[2] >>> 1) - d[6];
    a6 = d[2] + (d[6] >>> 1);
    b0 = a0 + a6; b2 = a4 + a2; b4 = a4 - a2; b6 = a0 - a6;
    a1 = -d[3] + d[5] - d[7] - (d[7] >>> 1);
    a3 = d[1] + d[7] - d[3] - (d[3] >>> 1);
    a5 = -d[1] + d[7] + d[5] + (d[5] >>> 1);
    a7 = d[3] + d[5] + d[1] + (d[1] >>> 1);
    b1 = a1 + (a7 >>> 2); b7 = a7 - (a1 >>> 2);
    b3 = a3 + (a5 >>> 2); b5 = (a3 >>> 2) - a5;
    x[0] = b0 + b7; x[1] = b2 + b5; x[2] = b4 + b3; x[3] = b6 + b1;
    x[4] = b6 - b1; x[5] = b4 - b3; x[6] = b2 - b5; x[7] = b0 - b7;
  endfunction

  initial begin
    for (int l = 0; l < NLINES; l++) begin
      s_t t4[4], b4[4], r4[4], q4[4], x8[8];
      lmode[l] = tmode_e'(l % 3 == 0 ? MODE_4X4 : (l % 3 == 1 ? MODE_8X8 : MODE_HAD));
      for (int n = 0; n < 8; n++) din[l][n] = s_t'($signed($urandom_range(0, 8191)) - 4096);
      if (lmode[l] == MODE_8X8) begin
        ref8(din[l], x8);
        dexp[l] = x8;
      end else begin
        for (int n = 0; n < 4; n++) begin t4[n] = din[l][n]; b4[n] = din[l][n+4]; end
        ref4(t4, lmode[l] == MODE_HAD, r4);
        ref4(b4, lmode[l] == MODE_HAD, q4);
        for (int n = 0; n < 4; n++) begin dexp[l][n] = r4[n]; dexp[l][n+4] = q4[n]; end
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    for (int l = 0; l < NLINES; l++) begin
      // a gap now and then
      if (l % 7 == 6) begin
        in_valid <= 1'b0;
        @(negedge clk);
      end
      for (int k = 0; k < 4; k++) begin
        in_valid <= 1'b1;
        in_tag   <= '{mode: lmode[l], blk: 2'(l), line: 3'(l / 4), pg: 1'(l), tp: 1'(l / 2), last: 1'b0};
        if (lmode[l] == MODE_8X8) begin
          in_top <= din[l][2*k];
          in_bot <= din[l][2*k+1];
        end else begin
          in_top <= din[l][k];
          in_bot <= din[l][k+4];
        end
        if (k == 0) lstart[l] = cyc;
        @(negedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (30) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  int ol = 0;
  always @(posedge clk) begin
    if (out_valid) begin
      s_t ea, eb;
      int l;
      l = ol;
      if (lmode[l] == MODE_8X8) begin ea = dexp[l][out_k]; eb = dexp[l][7 - out_k]; end
      else begin ea = dexp[l][out_k]; eb = dexp[l][out_k + 4]; end
      checks++;
      if (out_a !== ea || out_b !== eb) begin
        failures++;
        $display("line %0d mode %0d k %0d: got %0d %0d expected %0d %0d",
                 l, lmode[l], out_k, out_a, out_b, ea, eb);
      end
      checks++;
      if (out_tag.mode != lmode[l] || out_tag.blk != 2'(l)) begin
        failures++; $display("line %0d: wrong tag", l);
      end
      if (out_k == 2'd0) begin
        checks++;
        if (cyc - lstart[l] != LAT) begin
          failures++; $display("line %0d: latency %0d", l, cyc - lstart[l]);
        end
      end
      if (out_k == 2'd3) ol++;
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
