// transpose_buffer: transposition memory between the horizontal and the
// vertical 1-D pass. Two pages of 64 samples let the horizontal pass fill
// one page while the vertical pass reads the other.
//
// The memory itself does no reordering: the horizontal pass writes each
// sample at its raster address (row, column) and the vertical pass reads
// with the row and column fields of the address exchanged, so the
// transposition is only a rearrangement of address bits, as the document
// describes. Two samples are written and two are read per clock.
//
// Interface: addresses are {page, raster address}; reads are registered
// (data the clock after the address).
module transpose_buffer
  import avc_itrans_pkg::*;
#(
  parameter int unsigned WIDTH = DW,
  parameter int unsigned DEPTH = 128
) (
  input  logic                          clk,
  input  logic [1:0]                    we,
  input  logic [1:0][$clog2(DEPTH)-1:0] waddr,
  input  logic signed [1:0][WIDTH-1:0]  wdata,
  input  logic [1:0][$clog2(DEPTH)-1:0] raddr,
  output logic signed [1:0][WIDTH-1:0]  rdata
);

  logic signed [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (we[p]) mem[waddr[p]] <= wdata[p];
      rdata[p] <= mem[raddr[p]];
    end
  end

  // The two samples written in one clock never share an address.
  a_two_writes: assert property (@(posedge clk) (we == 2'b11) |-> waddr[0] != waddr[1]);

endmodule
