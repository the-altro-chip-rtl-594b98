// altro_tcf: the Tail Cancellation Filter.
//
// The long tail of a wire-chamber pulse is removed by a third-order IIR
// filter built from three first-order sections in cascade. Each section
// keeps one state w[n-1] and computes
//     w[n] = x[n] + K * w[n-1]
//     y[n] = w[n] - L * w[n-1]
// i.e. H(z) = (1 - L z^-1) / (1 - K z^-1): its pole at K cancels one
// exponential of the tail, its zero at L puts back a faster one. The six
// coefficients K1..K3, L1..L3 are programmable per channel. The 11-bit two's
// complement input is padded to the 18-bit fixed-point format of the filter
// (7 fractional bits), and the 18-bit result is rounded back to 11 bits.
//
// Timing: one register (the section states and the output) - dout is the
// filtered value of the din presented one clk edge earlier.
// Structure, 18-bit arithmetic and 11-bit input/output follow the chip.
// The coefficient format (unsigned 16-bit fractions, value = K / 2**16),
// the 7-bit padding, round-half-up and saturation at every adder are this
// design's choices.
module altro_tcf
  import altro_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [DP_W-1:0] din,
  input  tcf_coef_t              coef,
  output logic signed [DP_W-1:0] dout
);

  localparam int unsigned W = TCF_W;
  localparam logic signed [W+1:0] WMAX = (W+2)'((1 << (W-1)) - 1);
  localparam logic signed [W+1:0] WMIN = -(W+2)'(1 << (W-1));

  function automatic logic signed [W-1:0] sat(input logic signed [W+1:0] v);
    if (v > WMAX)      return W'(WMAX);
    else if (v < WMIN) return W'(WMIN);
    else               return v[W-1:0];
  endfunction

  // coefficient (unsigned Q0.16) times state, result in state units
  function automatic logic signed [W+1:0] mulc(input logic [COEF_W-1:0] c,
                                              input logic signed [W-1:0] s);
    logic signed [W+COEF_W:0] p;
    p = $signed({1'b0, c}) * s;
    return (W+2)'(p >>> COEF_W);
  endfunction

  logic signed [W-1:0] st [3];       // section states w[n-1]
  logic signed [W-1:0] x  [4];       // section inputs, x[3] = filter output
  logic signed [W-1:0] w  [3];
  logic [COEF_W-1:0]   kc [3];
  logic [COEF_W-1:0]   lc [3];

  assign kc[0] = coef.k1; assign kc[1] = coef.k2; assign kc[2] = coef.k3;
  assign lc[0] = coef.l1; assign lc[1] = coef.l2; assign lc[2] = coef.l3;

  always_comb begin
    x[0] = W'(din) <<< TCF_FRAC;     // padding
    for (int i = 0; i < 3; i++) begin
      w[i]   = sat((W+2)'(x[i]) + mulc(kc[i], st[i]));
      x[i+1] = sat((W+2)'(w[i]) - mulc(lc[i], st[i]));
    end
  end

  // rounding back to 11 bits
  logic signed [W:0]      rnd;
  logic signed [DP_W-1:0] y11;
  always_comb begin
    rnd = ((W+1)'(x[3]) + (W+1)'(1 << (TCF_FRAC-1))) >>> TCF_FRAC;
    if (rnd > 1023)       y11 = 11'sd1023;
    else if (rnd < -1024) y11 = -11'sd1024;
    else                  y11 = rnd[DP_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) st[i] <= '0;
      dout <= '0;
    end else begin
      for (int i = 0; i < 3; i++) st[i] <= w[i];
      dout <= y11;
    end

endmodule
