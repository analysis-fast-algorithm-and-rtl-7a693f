// sp_sram: single-port synchronous SRAM, written as an array.
//
// One access per cycle: with ce and we high, wdata is written to addr; with
// ce high and we low, the word at addr appears on rdata after the clock
// edge (one-cycle read latency) and holds until the next read. The
// contents are not reset. The defaults are the 96 x 32 current- and
// reconstructed-macroblock buffers; the plane-predictor buffer is the same
// module at 64 x 32. Sizes follow the document's memory list; the port
// protocol is this design's choice (that of a typical SRAM macro).
module sp_sram #(
  parameter int DEPTH = 96,
  parameter int WIDTH = 32,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
