// coef_buffer: input memory of the transform, holding two pages of 64
// coefficients so the host can fill one page while the engine reads the
// other. It has a host write port taking two coefficients per clock (so a
// page is filled as fast as the engine consumes one) and a host read port,
// two read ports
// for the engine (one per pipeline, so two coefficients leave per clock), and
// two write ports through which a Hadamard job writes its results back into
// the page it came from (the document's feedback loop into the input memory).
//
// The document names this memory and the feedback loop; the page count,
// port set and widths are this design's choice.
//
// Interface: addresses are {page, raster address}. Reads are registered:
// data appears the clock after the address. Writes to one address in the same clock
// are not allowed; the engine only writes back into a page the host must not
// touch (page_busy of the top).
module coef_buffer
  import avc_itrans_pkg::*;
#(
  parameter int unsigned WIDTH = COEF_W,
  parameter int unsigned DEPTH = 128
) (
  input  logic                             clk,
  input  logic [1:0]                       h_we,
  input  logic [1:0][$clog2(DEPTH)-1:0]    h_waddr,
  input  logic signed [1:0][WIDTH-1:0]     h_wdata,
  input  logic [$clog2(DEPTH)-1:0]         h_raddr,
  output logic signed [WIDTH-1:0]          h_rdata,
  input  logic [1:0]                       fb_we,
  input  logic [1:0][$clog2(DEPTH)-1:0]    fb_addr,
  input  logic signed [1:0][WIDTH-1:0]     fb_data,
  input  logic [1:0][$clog2(DEPTH)-1:0]    rd_addr,
  output logic signed [1:0][WIDTH-1:0]     rd_data
);

  logic signed [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++)
      if (h_we[p]) mem[h_waddr[p]] <= h_wdata[p];
    for (int p = 0; p < 2; p++)
      if (fb_we[p]) mem[fb_addr[p]] <= fb_data[p];
    h_rdata <= mem[h_raddr];
    for (int p = 0; p < 2; p++)
      rd_data[p] <= mem[rd_addr[p]];
  end

endmodule
