// lzw_ram: synchronous simple dual-port RAM used for the code RAM (256 x 8),
// the char RAM (256 x 1) and the stack RAM (256 x 1) of the decompressor.
//
// One write port and one read port, both on the rising clock edge. The read
// data is registered: rdata holds mem[raddr] as sampled at the last edge
// (read-first: a read of the address being written returns the old word).
// The contents are not reset; the controllers never use a word they have not
// written. The sizes are the block diagram's; the port arrangement and the
// one-cycle read latency are this design's own choices, modelled on a
// standard-cell SRAM macro.
module lzw_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
