// tb_coef_buffer: self-checking test of the input memory. Random host
// writes (two per clock), write-back writes (two per clock, to other
// addresses) and reads on all three read ports are checked every clock
// against a model array; reads return the data one clock after the address.
module tb_coef_buffer;
  import avc_itrans_pkg::*;

  localparam int N = 3000;

  logic clk = 1'b0;
  logic [1:0] h_we = '0;
  logic [1:0][6:0] h_waddr = '0;
  logic signed [1:0][COEF_W-1:0] h_wdata = '0;
  logic [6:0] h_raddr = '0;
  logic signed [COEF_W-1:0] h_rdata;
  logic [1:0] fb_we = '0;
  logic [1:0][6:0] fb_addr = '0;
  logic signed [1:0][COEF_W-1:0] fb_data = '0;
  logic [1:0][6:0] rd_addr = '0;
  logic signed [1:0][COEF_W-1:0] rd_data;

  coef_buffer dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [COEF_W-1:0] model [128];

  initial begin
    // initialise every word through the host port
    for (int a = 0; a < 128; a += 2) begin
      h_we = 2'b11;
      h_waddr[0] = 7'(a); h_waddr[1] = 7'(a + 1);
      h_wdata[0] = COEF_W'(a * 3); h_wdata[1] = COEF_W'(a * 3 + 3);
      model[a] = COEF_W'(a * 3); model[a+1] = COEF_W'(a * 3 + 3);
      @(negedge clk);
    end
    for (int t = 0; t < N; t++) begin
      logic [6:0] ha, ra0, ra1, hw0, hw1, fw0, fw1;
      logic [6:0] used [4];
      // four distinct write addresses
      hw0 = 7'($urandom); hw1 = hw0 + 7'd1; fw0 = hw0 + 7'd2; fw1 = hw0 + 7'd3;
      h_we = 2'($urandom); fb_we = 2'($urandom);
      h_waddr[0] = hw0; h_waddr[1] = hw1; fb_addr[0] = fw0; fb_addr[1] = fw1;
      h_wdata[0] = COEF_W'($urandom); h_wdata[1] = COEF_W'($urandom);
      fb_data[0] = COEF_W'($urandom); fb_data[1] = COEF_W'($urandom);
      ha = 7'($urandom); ra0 = 7'($urandom); ra1 = 7'($urandom);
      h_raddr = ha; rd_addr[0] = ra0; rd_addr[1] = ra1;
      @(posedge clk);
      #1;
      checks++;
      if (h_rdata !== model[ha] || rd_data[0] !== model[ra0] || rd_data[1] !== model[ra1]) begin
        failures++;
        $display("read mismatch at step %0d", t);
      end
      if (h_we[0])  model[hw0] = h_wdata[0];
      if (h_we[1])  model[hw1] = h_wdata[1];
      if (fb_we[0]) model[fw0] = fb_data[0];
      if (fb_we[1]) model[fw1] = fb_data[1];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
