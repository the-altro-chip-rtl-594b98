// altro_tgl_sync: carries single events from one clock domain to another.
// The sender flips tgl_in once per event; here it passes two flip-flops and
// every change seen after them becomes a one-cycle pulse on clk. Events must
// be spaced by at least three cycles of the receiving clock. A standard
// structure chosen for the readout-to-sampling clock commands.
module altro_tgl_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic tgl_in,
  output logic pulse
);
  logic [2:0] s;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s <= '0;
    else        s <= {s[1:0], tgl_in};
  assign pulse = s[2] ^ s[1];
endmodule
