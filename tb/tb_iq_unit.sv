// tb_iq_unit: self-checking test of the inverse quantization unit. Random
// coefficients, positions, qp and modes are fed one per clock; the expected
// value is the scaling formula (f * W * N * 2^(qp/6)) >> QS worked out here
// with the standard's norm-adjust values, or the unchanged coefficient in
// Hadamard mode. The 5-clock latency, the flat default weight 16 and user
// weight matrices written through the RAM port are all checked.
module tb_iq_unit;
  import avc_itrans_pkg::*;

  localparam int LAT = 5;
  localparam int N = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [COEF_W-1:0] in_coef = '0;
  logic [2:0] in_i = '0, in_j = '0;
  tmode_e in_mode = MODE_4X4;
  logic [5:0] in_qp = '0;
  line_t in_tag = '0;
  logic ws_we = 1'b0, ws_is8 = 1'b0;
  logic [5:0] ws_addr = '0;
  logic [WS_W-1:0] ws_data = '0;
  logic out_valid;
  logic signed [DW-1:0] out_data;
  line_t out_tag;

  iq_unit dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int w4 [16], w8 [64];
  bit user = 0;
  int nsat = 0;
  longint expq [$];
  int     cycq [$];
  int     tagq [$];

  function automatic int nref(bit is8, int rem, int i, int j);
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

  task automatic drive(int n);
    for (int t = 0; t < n; t++) begin
      int m, qp, i, j, f, w;
      longint e;
      m  = $urandom_range(0, 2);
      qp = $urandom_range(0, 51);
      i  = $urandom_range(0, (m == 2) ? 7 : 3);
      j  = $urandom_range(0, (m == 2) ? 7 : 3);
      f  = $signed($urandom_range(0, 4000)) - 2000;
      if (m != 1 && qp >= 30) f = f / 64;
      in_valid = ($urandom_range(0, 4) != 0);
      in_mode = tmode_e'(m); in_qp = 6'(qp); in_i = 3'(i); in_j = 3'(j);
      in_coef = COEF_W'(f);
      in_tag = line_t'(t);
      if (in_valid) begin
        if (m == 1) e = f;
        else begin
          w = !user ? 16 : (m == 2 ? w8[i*8+j] : w4[i*4+j]);
          e = (longint'(f) * w * nref(m == 2, qp % 6, i, j) * (longint'(1) << (qp / 6)))
              >>> (m == 2 ? 6 : 4);
          // the unit saturates to DW bits
          if (e > (longint'(1) << (DW - 1)) - 1) begin e = (longint'(1) << (DW - 1)) - 1; nsat++; end
          if (e < -(longint'(1) << (DW - 1))) begin e = -(longint'(1) << (DW - 1)); nsat++; end
        end
        expq.push_back(e);
        cycq.push_back(cyc);
        tagq.push_back(t);
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
  endtask

  initial begin
    for (int a = 0; a < 16; a++) w4[a] = 4 + ((a * 11) % 37);
    for (int a = 0; a < 64; a++) w8[a] = 5 + ((a * 13) % 51);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    drive(N);
    repeat (10) @(negedge clk);
    for (int a = 0; a < 80; a++) begin
      ws_we = 1'b1;
      ws_is8 = (a >= 16);
      ws_addr = 6'(a >= 16 ? a - 16 : a);
      ws_data = WS_W'(a >= 16 ? w8[a-16] : w4[a]);
      @(negedge clk);
    end
    ws_we = 1'b0;
    user = 1;
    drive(N);
    repeat (10) @(negedge clk);
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint e;
      int c, t;
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = expq.pop_front(); c = cycq.pop_front(); t = tagq.pop_front();
        if (out_data !== DW'(e) || out_tag !== line_t'(t) || cyc - c != LAT) begin
          failures++;
          $display("sample %0d: got %0d expected %0d, latency %0d", t, out_data, e, cyc - c);
        end
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
