// altro_dmem: the multi-event data memory of one channel, 1024 x 40 bits by
// default.
//
// The data format stage writes at most one 40-bit word every four sampling
// clock cycles on the sampling clock; the bus interface reads it back as a
// block transfer on the independent readout clock. Buffers are address
// ranges of this array handed out by the memory manager. Reads are
// synchronous: rdata holds the word at raddr one rclk cycle after re. The
// size follows the chip; the simple dual-port organisation is this design's
// choice.
module altro_dmem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 40,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk)
    if (we) mem[waddr] <= wdata;

  always_ff @(posedge rclk)
    if (re) rdata <= mem[raddr];

endmodule
