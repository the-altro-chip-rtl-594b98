// altro_bc1: Baseline Correction I, the first stage of the data processor.
//
// It conditions the raw 10-bit ADC code into an 11-bit two's complement
// sample. Its parts: an optional polarity inversion; a self-calibration
// circuit that, outside the acquisition, tracks the running average of the
// signal (vpd) and freezes it while the acquisition lasts so that din - vpd
// removes slow drifts; the 1K x 10 baseline pattern memory, addressed either
// by the sample time within the acquisition (pattern subtraction or test
// pattern injection) or by the sample value (look-up table for non-linearity
// or gain correction); and a subtractor whose '+' operand is the data or the
// memory output and whose '-' operand is the memory output or the fixed
// offset fpd. With power save on, the memory is not read and the output is
// forced to zero outside the acquisition.
//
// Timing: din is registered, the memory read and the operands take a second
// register and the result a third, so dout is valid 3 clk edges after din.
// The block structure (Fig. 6 of the design notes: input register,
// polarity, self-cal, address and operand multiplexers, memory, subtractor,
// output gating and register) follows the chip. The select encoding
// (bc1_cfg_t), the self-calibration as an exponential average with weight
// 2**-SC_SHIFT, the clamping of a negative address to zero and the
// saturation of the result to 11 bits are this design's choices.
module altro_bc1
  import altro_pkg::*;
#(
  parameter int unsigned SC_SHIFT  = 5,
  parameter int unsigned PED_DEPTH_P = PED_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [ADC_W-1:0]         din,
  input  logic                     acq,       // acquisition active (aligned with din)
  input  logic [TIME_W-1:0]        time_idx,  // sample time within the acquisition
  input  bc1_cfg_t                 cfg,
  input  logic [ADC_W-1:0]         fpd,
  output logic [ADC_W-1:0]         vpd,
  output logic signed [DP_W-1:0]   dout,
  // baseline memory write port (readout clock)
  input  logic                     pm_wclk,
  input  logic                     pm_we,
  input  logic [$clog2(PED_DEPTH_P)-1:0] pm_waddr,
  input  logic [ADC_W-1:0]         pm_wdata
);

  localparam int unsigned PAW = $clog2(PED_DEPTH_P);

  // ---- stage 1: input register
  logic [ADC_W-1:0]  din_r;
  logic              acq_r;
  logic [TIME_W-1:0] time_r;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      din_r  <= '0;
      acq_r  <= 1'b0;
      time_r <= '0;
    end else begin
      din_r  <= din;
      acq_r  <= acq;
      time_r <= time_idx;
    end

  // polarity
  logic [ADC_W-1:0] dpol;
  assign dpol = cfg.pol ? ~din_r : din_r;   // 1023 - din

  // ---- self-calibration: running average outside the acquisition
  logic [ADC_W+SC_SHIFT-1:0] sc_acc;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      sc_acc <= '0;
    else if (!acq_r) sc_acc <= sc_acc + (ADC_W+SC_SHIFT)'(dpol) - (ADC_W+SC_SHIFT)'(sc_acc >> SC_SHIFT);
  assign vpd = ADC_W'(sc_acc >> SC_SHIFT);

  logic signed [DP_W:0] dcal;               // din - vpd, 12 bits signed
  assign dcal = $signed({2'b00, dpol}) - $signed({2'b00, vpd});

  // address multiplexers
  logic [PAW-1:0] addr;
  logic [ADC_W-1:0] addr_data;
  always_comb begin
    if (!cfg.addr_cal)   addr_data = dpol;
    else if (dcal < 0)   addr_data = '0;
    else                 addr_data = dcal[ADC_W-1:0];
    addr = cfg.addr_time ? PAW'(time_r) : PAW'(addr_data);
  end

  logic gate;                               // output forced to zero
  assign gate = cfg.pwsave && !acq_r;

  // ---- stage 2: memory read and operand register
  logic [ADC_W-1:0] mem_q;
  altro_pedmem #(.DEPTH(PED_DEPTH_P), .WIDTH(ADC_W)) u_mem (
    .wclk(pm_wclk), .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata),
    .rclk_rd(clk), .re(!gate), .raddr(addr), .rdata(mem_q)
  );

  logic signed [DP_W:0] pdata_r;
  logic                 gate_r;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pdata_r <= '0;
      gate_r  <= 1'b1;
    end else begin
      pdata_r <= cfg.plus_cal ? dcal : $signed({2'b00, dpol});
      gate_r  <= gate;
    end

  logic signed [DP_W+1:0] plus, minus, diff;
  logic signed [DP_W-1:0] sat;
  always_comb begin
    plus  = cfg.plus_mem  ? $signed({3'b000, mem_q}) : (DP_W+2)'(pdata_r);
    minus = cfg.minus_mem ? $signed({3'b000, mem_q}) : $signed({3'b000, fpd});
    diff  = plus - minus;
    if (diff > 1023)       sat = 11'sd1023;
    else if (diff < -1024) sat = -11'sd1024;
    else                   sat = diff[DP_W-1:0];
  end

  // ---- stage 3: gated output register
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      dout <= '0;
    else if (gate_r) dout <= '0;
    else             dout <= sat;

endmodule
