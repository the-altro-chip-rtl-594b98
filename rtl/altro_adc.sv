// altro_adc: behavioural model of one ALTRO channel ADC (not synthesizable
// logic; the real part is an analog pipelined converter).
//
// The converter is a fully differential 10-bit pipeline of nine stages: the
// first eight resolve 1.5 bits each (decision -1, 0 or +1 with thresholds at
// +-1/4 of the range, residue amplified by two), the ninth resolves one bit.
// A sequencer aligns the stage decisions of one sample into a single word and
// the digital correction adds the overlapping decisions into a clean 10-bit
// code. The input range is set by the references: x = (vin - vinb) /
// (vrefp - vrefm) runs from -1 (code 0) to +1 (code 1023); with VREFP = 1 V,
// VREFM = 0 V that is a 2 V differential swing, 2 mV per LSB.
//
// Timing: the input is sampled on the rising edge of sclk and the code
// appears on d after the falling edge 5.5 cycles later, so it is first
// taken by rising-edge logic 6 edges after it was sampled. The stage
// structure, resolutions, references and latency follow the chip; the
// threshold values, the correction sum and the two-edge modelling of the
// half cycle are this model's own. vcm is accepted for completeness and
// does not affect the result. Reference circuit and bias resistor are not
// modelled.
module altro_adc #(
  parameter int unsigned LAT_POS = 6   // latency is LAT_POS - 0.5 cycles
) (
  input  logic       sclk,
  input  real        vin,
  input  real        vinb,
  input  real        vcm,
  input  real        vrefp,
  input  real        vrefm,
  output logic [9:0] d
);

  // Nine stage decisions of one sample: d1..d8 in {0,1,2}, d9 in {0,1}.
  typedef struct packed {
    logic [7:0][1:0] dec;
    logic            last;
  } stages_t;

  stages_t pipe [LAT_POS];

  function automatic stages_t convert(input real x_in);
    stages_t s;
    real x;
    x = x_in;
    for (int i = 0; i < 8; i++) begin
      if (x > 0.25) begin
        s.dec[7-i] = 2'd2; x = 2.0 * x - 1.0;
      end else if (x < -0.25) begin
        s.dec[7-i] = 2'd0; x = 2.0 * x + 1.0;
      end else begin
        s.dec[7-i] = 2'd1; x = 2.0 * x;
      end
    end
    s.last = (x >= 0.0);
    return s;
  endfunction

  // Digital correction: overlapping 1.5-bit decisions summed with weights
  // 2**(9-i), plus the final bit, around mid-scale.
  function automatic logic [9:0] correct(input stages_t s);
    int code;
    code = 511 + int'(s.last);
    for (int i = 0; i < 8; i++)
      code += (int'(s.dec[7-i]) - 1) * (1 << (8 - i));
    if (code < 0) code = 0;
    if (code > 1023) code = 1023;
    return 10'(code);
  endfunction

  real xnorm;
  always_comb begin
    if (vrefp - vrefm > 0.0) xnorm = (vin - vinb) / (vrefp - vrefm);
    else                     xnorm = 0.0;
  end

  always_ff @(posedge sclk) begin
    pipe[0] <= convert(xnorm);
    for (int i = 1; i < int'(LAT_POS); i++) pipe[i] <= pipe[i-1];
  end

  // Output buffers update on the falling edge: 5.5 cycles of latency.
  always_ff @(negedge sclk) d <= correct(pipe[LAT_POS-1]);

endmodule
