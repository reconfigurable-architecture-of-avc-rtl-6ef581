// tb_sample_mixer: self-checking test of the sample mixer. Random A, B1, B2
// with random phase and mode are applied every clock. In 8x8 mode the
// expected outputs are A +/- (B1 -/+ (B2 >> 2)) with the per-phase signs of
// the 8-point butterfly; in the other modes A and B1 must pass unchanged.
// The 3-clock latency and the phase and tag passed alongside are checked.
module tb_sample_mixer;
  import avc_itrans_pkg::*;

  localparam int N = 800;
  localparam int LAT = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [1:0] in_k = '0;
  line_t in_tag = '0;
  logic signed [DW-1:0] in_a = '0, in_b1 = '0, in_b2 = '0;
  logic out_valid;
  logic [1:0] out_k;
  line_t out_tag;
  logic signed [DW-1:0] out_a, out_b;

  sample_mixer dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef logic signed [DW-1:0] s_t;
  s_t ea [$], eb [$];
  int ec [$], ek [$];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < N; t++) begin
      s_t a, b1, b2, bo;
      int k, m;
      a  = s_t'($signed($urandom_range(0, 100000)) - 50000);
      b1 = s_t'($signed($urandom_range(0, 100000)) - 50000);
      b2 = s_t'($signed($urandom_range(0, 100000)) - 50000);
      k = $urandom_range(0, 3);
      m = $urandom_range(0, 2);
      in_valid = ($urandom_range(0, 5) != 0);
      in_a = a; in_b1 = b1; in_b2 = b2; in_k = 2'(k);
      in_tag = '{mode: tmode_e'(m), blk: 2'(t), line: 3'(t >> 2), pg: 1'b0, tp: 1'b0, last: 1'b0};
      if (in_valid) begin
        if (m != 2) begin ea.push_back(a); eb.push_back(b1); end
        else begin
          case (k)
            0: begin bo = b1 - (b2 >>> 2); ea.push_back(a + bo); eb.push_back(a - bo); end // b7
            1: begin bo = (b2 >>> 2) - b1; ea.push_back(a + bo); eb.push_back(a - bo); end // b5
            default: begin bo = b1 + (b2 >>> 2); ea.push_back(a + bo); eb.push_back(a - bo); end
          endcase
        end
        ec.push_back(cyc);
        ek.push_back(t);
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (ea.size() != 0) begin failures++; $display("outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      s_t a, b;
      int c, t;
      checks++;
      if (ea.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        a = ea.pop_front(); b = eb.pop_front(); c = ec.pop_front(); t = ek.pop_front();
        if (out_a !== a || out_b !== b || cyc - c != LAT || out_tag.blk != 2'(t)) begin
          failures++;
          $display("input %0d: got %0d %0d expected %0d %0d latency %0d", t, out_a, out_b, a, b, cyc - c);
        end
      end
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
