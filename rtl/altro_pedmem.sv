// altro_pedmem: the baseline (pedestal) pattern memory of one channel,
// 1K x 10 bits by default.
//
// It is written from the bus side on the readout clock and read by the
// Baseline Correction I stage on the sampling clock, so it has two ports on
// two clocks. The read is synchronous: with re high at a rising edge of
// rclk_rd the word at raddr appears on rdata after that edge (one cycle of
// latency); with re low the output holds, which is how the power-save mode
// stops the memory. The size follows the chip; the two-port organisation
// and the read enable are this design's choice.
module altro_pedmem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 10,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk_rd,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk)
    if (we) mem[waddr] <= wdata;

  always_ff @(posedge rclk_rd)
    if (re) rdata <= mem[raddr];

endmodule
