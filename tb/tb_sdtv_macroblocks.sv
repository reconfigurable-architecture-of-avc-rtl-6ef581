// tb_sdtv_macroblocks: throughput test for real-time SDTV decoding. It runs
// the inverse transforms of whole macroblocks through the engine, in three
// formats, 4 macroblocks each:
//   4:2:0 Intra16x16 : 1 Hadamard job (16 luma DC) + 4 luma 4x4 jobs + 2 chroma 4x4 jobs
//   4:2:2 Intra16x16 : 1 Hadamard job + 4 luma 4x4 jobs + 4 chroma 4x4 jobs
//   4:2:0 with 8x8   : 4 luma 8x8 jobs + 2 chroma 4x4 jobs
// with a host that fills pages two coefficients per clock. Every result is
// checked as in the end-to-end test, and the clocks each macroblock takes
// are checked against the budget for 720x576 at 25 frames/s with a
// 13.5 MHz clock: 13.5e6 / (45 * 36 * 25) = 333 clocks per macroblock.
module tb_sdtv_macroblocks;
  import avc_itrans_pkg::*;

  localparam int NMB = 4;
  localparam int NJOBS = NMB * (7 + 9 + 6);
  localparam int BUDGET = 333;
  localparam int LAT4  = 41;   // accept to first residual, 4x4 job
  localparam int LAT8  = 65;   // accept to first residual, 8x8 job

  typedef logic signed [31:0] s_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] h_we = '0;
  logic [1:0][6:0] h_waddr;
  logic signed [1:0][COEF_W-1:0] h_wdata;
  logic [6:0] h_raddr = '0;
  logic signed [COEF_W-1:0] h_rdata;
  logic ws_we = 1'b0, ws_is8 = 1'b0;
  logic [5:0] ws_addr = '0;
  logic [WS_W-1:0] ws_data = '0;
  logic start_valid = 1'b0, start_ready, start_page = 1'b0;
  tmode_e start_mode = MODE_4X4;
  logic [5:0] start_qp = '0;
  logic out_valid, out_page, out_last;
  logic [5:0] out_addr_a, out_addr_b;
  logic signed [DW-7:0] out_a, out_b;
  logic [1:0] page_busy;
  logic job_done, job_done_page;

  avc_itrans_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // jobs
  tmode_e jmode [NJOBS];
  int     jqp   [NJOBS];
  bit     juser [NJOBS];
  s_t     jcoef [NJOBS][64];
  s_t     jexp  [NJOBS][64];
  int     jacc  [NJOBS];
  int     jfmt  [NJOBS];
  int     mbstart [3 * NMB + 1];
  int     nmbs = 0;
  int     n_mb = 0, worst [3] = '{0, 0, 0};

  int w4 [16];
  int w8 [64];

  // mechanism counters
  int n_switch = 0, n_had = 0, n_user = 0, n_lsh = 0, n_rsh = 0;
  int n_reuse = 0, n_b2b = 0, n_stall = 0, n_lat = 0, n_hadwait = 0;

  function automatic int norm_ref(bit is8, int rem, int i, int j);
    int v4 [6][3] = '{'{10,16,13},'{11,18,14},'{13,20,16},'{14,23,18},'{16,25,20},'{18,29,23}};
    int v8 [6][6] = '{'{20,18,32,19,25,24},'{22,19,35,21,28,26},'{26,23,42,24,33,31},
                      '{28,25,45,26,35,33},'{32,28,51,30,40,38},'{36,32,58,34,46,43}};
    if (!is8) return (i % 2 == 0 && j % 2 == 0) ? v4[rem][0] :
                     (i % 2 == 1 && j % 2 == 1) ? v4[rem][1] : v4[rem][2];
    if (i % 4 == 0 && j % 4 == 0) return v8[rem][0];
    if (i % 2 == 1 && j % 2 == 1) return v8[rem][1];
    if (i % 4 == 2 && j % 4 == 2) return v8[rem][2];
    if ((i % 4 == 0 && j % 2 == 1) || (i % 2 == 1 && j % 4 == 0)) return v8[rem][3];
    if ((i % 4 == 0 && j % 4 == 2) || (i % 4 == 2 && j % 4 == 0)) return v8[rem][4];
    return v8[rem][5];
  endfunction

  function automatic void t4(inout s_t x[4], input bit had);
    s_t e0, e1, e2, e3;
    e0 = x[0] + x[2];
    e1 = x[0] - x[2];
    e2 = had ? x[1] - x[3] : (x[1] >>> 1) - x[3];
    e3 = had ? x[1] + x[3] : x[1] + (x[3] >>> 1);
    x[0] = e0 + e3; x[1] = e1 + e2; x[2] = e1 - e2; x[3] = e0 - e3;
  endfunction

  function automatic void t8(inout s_t d[8]);
    s_t a0, a1, a2, a3, a4, a5, a6, a7, b0, b1, b2, b3, b4, b5, b6, b7;
    a0 = d[0] + d[4];         a4 = d[0] - d[4];
    a2 = (d[2] >>> 1) - d[6]; a6 = d[2] + (d[6] >>> 1);
    b0 = a0 + a6; b2 = a4 + a2; b4 = a4 - a2; b6 = a0 - a6;
    a1 = -d[3] + d[5] - d[7] - (d[7] >>> 1);
    a3 = d[1] + d[7] - d[3] - (d[3] >>> 1);
    a5 = -d[1] + d[7] + d[5] + (d[5] >>> 1);
    a7 = d[3] + d[5] + d[1] + (d[1] >>> 1);
    b1 = a1 + (a7 >>> 2); b7 = a7 - (a1 >>> 2);
    b3 = a3 + (a5 >>> 2); b5 = (a3 >>> 2) - a5;
    d[0] = b0 + b7; d[1] = b2 + b5; d[2] = b4 + b3; d[3] = b6 + b1;
    d[4] = b6 - b1; d[5] = b4 - b3; d[6] = b2 - b5; d[7] = b0 - b7;
  endfunction

  // expected results of job j
  function automatic void model(int j);
    s_t m [64];
    int per, rem;
    per = jqp[j] / 6;
    rem = jqp[j] % 6;
    for (int a = 0; a < 64; a++) begin
      int i, c, w;
      longint p;
      if (jmode[j] == MODE_8X8) begin i = a / 8; c = a % 8; end
      else begin i = (a / 4) % 4; c = a % 4; end
      if (jmode[j] == MODE_HAD) m[a] = jcoef[j][a];
      else begin
        if (jmode[j] == MODE_8X8) w = juser[j] ? w8[a] : 16;
        else w = juser[j] ? w4[i * 4 + c] : 16;
        p = longint'(jcoef[j][a]) * w * norm_ref(jmode[j] == MODE_8X8, rem, i, c) * (longint'(1) << per);
        m[a] = s_t'(p >>> (jmode[j] == MODE_8X8 ? 6 : 4));
      end
    end
    if (jmode[j] == MODE_8X8) begin
      s_t v [8];
      for (int r = 0; r < 8; r++) begin
        for (int c = 0; c < 8; c++) v[c] = m[r*8+c];
        t8(v);
        for (int c = 0; c < 8; c++) m[r*8+c] = v[c];
      end
      for (int c = 0; c < 8; c++) begin
        for (int r = 0; r < 8; r++) v[r] = m[r*8+c];
        t8(v);
        for (int r = 0; r < 8; r++) m[r*8+c] = v[r];
      end
    end else begin
      s_t v [4];
      for (int b = 0; b < 4; b++) begin
        for (int r = 0; r < 4; r++) begin
          for (int c = 0; c < 4; c++) v[c] = m[b*16+r*4+c];
          t4(v, jmode[j] == MODE_HAD);
          for (int c = 0; c < 4; c++) m[b*16+r*4+c] = v[c];
        end
        for (int c = 0; c < 4; c++) begin
          for (int r = 0; r < 4; r++) v[r] = m[b*16+r*4+c];
          t4(v, jmode[j] == MODE_HAD);
          for (int r = 0; r < 4; r++) m[b*16+r*4+c] = v[r];
        end
      end
    end
    for (int a = 0; a < 64; a++) begin
      if (jmode[j] == MODE_HAD)
        jexp[j][a] = (m[a] > 32767) ? 32767 : (m[a] < -32768 ? -32768 : m[a]);
      else
        jexp[j][a] = (m[a] + 32) >>> 6;
    end
  endfunction

  // ------------------------------------------------------------ stimulus
  initial begin
    for (int a = 0; a < 16; a++) w4[a] = 6 + ((a * 7) % 23);
    for (int a = 0; a < 64; a++) w8[a] = 8 + ((a * 5) % 29);
    for (int j = 0; j < NJOBS; j++) begin
      int amp, per;
      begin
        int f, q;
        f = (j < NMB * 7) ? 0 : (j < NMB * 16 ? 1 : 2);
        q = (f == 0) ? j % 7 : (f == 1 ? (j - NMB * 7) % 9 : (j - NMB * 16) % 6);
        if (q == 0) mbstart[nmbs++] = j;
        if (f == 2) jmode[j] = (q < 4) ? MODE_8X8 : MODE_4X4;
        else        jmode[j] = (q == 0) ? MODE_HAD : MODE_4X4;
        jfmt[j] = f;
      end
      jqp[j]   = $urandom_range(10, 45);
      juser[j] = 1'b0;
      per = jqp[j] / 6;
      amp = (jmode[j] == MODE_HAD) ? 1500 : ((60 >> per) > 0 ? (60 >> per) : 1);
      for (int a = 0; a < 64; a++) begin
        if (jmode[j] == MODE_HAD && a >= 16) jcoef[j][a] = 0;
        else if ($urandom_range(0, 2) == 0) jcoef[j][a] = 0;
        else jcoef[j][a] = $signed($urandom_range(0, 2 * amp)) - amp;
      end
      model(j);
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    for (int j = 0; j < NJOBS; j++) begin
      int pg, n;
      pg = j % 2;
      while (page_busy[pg]) @(negedge clk);
      // a Hadamard job that used this page left its results there
      if (j >= 2 && jmode[j-2] == MODE_HAD) begin
        for (int a = 0; a < 16; a++) begin
          h_raddr = 7'({pg[0], 6'(a)});
          @(negedge clk);
          checks++;
          if (h_rdata !== COEF_W'(jexp[j-2][a])) begin
            failures++;
            $display("job %0d hadamard result %0d: got %0d expected %0d",
                     j - 2, a, h_rdata, jexp[j-2][a]);
          end
        end
        n_had++;
      end
      n = (jmode[j] == MODE_HAD) ? 8 : 32;
      for (int c = 0; c < n; c++) begin
        h_we = 2'b11;
        h_waddr[0] = 7'({pg[0], 6'(2*c)});
        h_waddr[1] = 7'({pg[0], 6'(2*c+1)});
        h_wdata[0] = COEF_W'(jcoef[j][2*c]);
        h_wdata[1] = COEF_W'(jcoef[j][2*c+1]);
        @(negedge clk);
      end
      h_we = 2'b00;
      start_valid = 1'b1;
      start_page  = pg[0];
      start_mode  = jmode[j];
      start_qp    = 6'(jqp[j]);
      @(posedge clk);
      while (!start_ready) begin
        // a short Hadamard job among the last two lets a job arrive before
        // the transposition page it needs is drained: a wait is expected then
        if ((!dut.seq_busy || dut.seq_last) && (j < 1 || jmode[j-1] != MODE_HAD) &&
            (j < 2 || jmode[j-2] != MODE_HAD)) begin
          n_stall++;
          $display("wait at job %0d: tp_next %0d state %0d rem %0d busy %b", j, dut.tp_next,
                   dut.tp_state[dut.tp_next], dut.vr_rem, page_busy);
        end
        @(posedge clk);
      end
      jacc[j] = cyc;
      if (dut.seq_last) n_b2b++;
      if (dut.tp_state[dut.tp_next] != dut.TP_FREE) n_reuse++;
      if (j > 0 && jmode[j] != jmode[j-1]) n_switch++;
      if (juser[j] && jmode[j] != MODE_HAD) n_user++;
      if (jmode[j] != MODE_HAD) begin
        if (jqp[j] / 6 >= (jmode[j] == MODE_8X8 ? 6 : 4)) n_lsh++; else n_rsh++;
      end
      @(negedge clk);
      start_valid = 1'b0;
    end
    // drain and read back the last Hadamard results
    repeat (150) @(negedge clk);
    for (int j = NJOBS - 2; j < NJOBS; j++) begin
      if (jmode[j] == MODE_HAD) begin
        for (int a = 0; a < 16; a++) begin
          h_raddr = 7'({1'(j % 2), 6'(a)});
          @(negedge clk);
          checks++;
          if (h_rdata !== COEF_W'(jexp[j][a])) begin
            failures++;
            $display("job %0d hadamard result %0d wrong", j, a);
          end
        end
        n_had++;
      end
    end
    finish_test();
  end

  // ------------------------------------------------------------ checker
  int oj = 0, oseen = 0, lastout = -1, ndone = 0, lat = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      while (oj < NJOBS && jmode[oj] == MODE_HAD) oj++;
      if (oseen == 0) begin
        checks++;
        lat = (jmode[oj] == MODE_8X8) ? LAT8 : LAT4;
        if (cyc - jacc[oj] == lat) n_lat++;
        // later than that only while the previous job's results still stream out
        if (cyc - jacc[oj] > lat && cyc != lastout + 1) begin
          failures++; $display("job %0d: first output after %0d clocks", oj, cyc - jacc[oj]);
        end
      end
      if (oseen > 0) begin
        checks++;
        if (cyc != lastout + 1) begin
          failures++; $display("job %0d: gap in output stream", oj);
        end
      end
      lastout = cyc;
      checks++;
      if (out_page != 1'(oj % 2) ||
          out_a !== (DW-6)'(jexp[oj][out_addr_a]) || out_b !== (DW-6)'(jexp[oj][out_addr_b])) begin
        failures++;
        $display("job %0d mode %0d qp %0d addr %0d/%0d: got %0d %0d expected %0d %0d",
                 oj, jmode[oj], jqp[oj], out_addr_a, out_addr_b, out_a, out_b,
                 jexp[oj][out_addr_a], jexp[oj][out_addr_b]);
      end
      oseen += 2;
      if (out_last) begin
        checks++;
        if (oseen != 64) begin failures++; $display("job %0d: %0d samples", oj, oseen); end
        oseen = 0;
        oj++;
        ndone++;
      end
    end
  end

  task automatic finish_test();
    int njobs_out;
    njobs_out = 0;
    for (int j = 0; j < NJOBS; j++) if (jmode[j] != MODE_HAD) njobs_out++;
    checks++;
    if (ndone != njobs_out) begin failures++; $display("%0d of %0d jobs delivered", ndone, njobs_out); end
    $display("mode switches %0d, hadamard write-backs %0d, user-weight jobs %0d,",
             n_switch, n_had, n_user);
    $display("left shifts %0d, right shifts %0d, early page reuse %0d, back-to-back starts %0d,",
             n_lsh, n_rsh, n_reuse, n_b2b);
    $display("engine wait clocks %0d, latency checks %0d", n_stall, n_lat);
    // clocks per macroblock: accept of its first job to accept of the next
    // macroblock's first job (steady state: the first macroblock of each
    // format is skipped)
    mbstart[nmbs] = -1;
    for (int m = 0; m + 1 < nmbs; m++) begin
      int f, d;
      f = jfmt[mbstart[m]];
      if (jfmt[mbstart[m + 1]] != f || (m > 0 && jfmt[mbstart[m - 1]] != f) || m == 0) continue;
      d = jacc[mbstart[m + 1]] - jacc[mbstart[m]];
      if (d > worst[f]) worst[f] = d;
      n_mb++;
      checks++;
      if (d > BUDGET) begin failures++; $display("macroblock %0d: %0d clocks", m, d); end
    end
    $display("clocks per macroblock: 4:2:0 %0d, 4:2:2 %0d, 4:2:0 8x8 %0d (budget %0d)",
             worst[0], worst[1], worst[2], BUDGET);
    checks++;
    if (n_mb == 0) begin failures++; $display("no macroblock timed"); end
    checks++;
    if (n_stall != 0) begin failures++; $display("engine inserted wait states"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
