// altro_channel: one acquisition channel - the data processor and the
// multi-event memory behind one ADC.
//
// The ADC code passes through Baseline Correction I (altro_bc1, with the
// baseline pattern memory), the Tail Cancellation Filter (altro_tcf),
// Baseline Correction II (altro_bc2) and Zero Suppression (altro_zs); the
// Data Format stage (altro_df) labels and packs the kept samples of the
// acquisition window and writes them into the channel's data memory
// (altro_dmem) at the buffer the memory manager assigned (wr_base).
//
// Timing: the processor latency from adc_d to the data format input is
// LAT_DP = 3 (BC1) + 1 (TCF) + 6 (BC2) + 11 (ZS) = 21 sampling clock cycles;
// acq/time_bc1 must be aligned with adc_d and win/time_df with the data
// format input, which is what altro_trigman produces. The memory is written
// on sclk and read on rclk (rd_re, data one rclk cycle later). The chain
// and its order follow the chip; the per-stage latencies are this design's.
module altro_channel
  import altro_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                   sclk,
  input  logic                   rclk,
  input  logic                   rst_n,
  input  logic [ADC_W-1:0]       adc_d,
  // acquisition control
  input  logic                   acq_bc1,
  input  logic [TIME_W-1:0]      time_bc1,
  input  logic                   win,
  input  logic [TIME_W-1:0]      time_df,
  input  logic [HWADDR_W-1:0]    hwaddr,
  input  logic [AW-1:0]          wr_base,
  input  logic [AW:0]            buf_words,
  // configuration
  input  bc1_cfg_t               bc1_cfg,
  input  logic [ADC_W-1:0]       fpd,
  input  tcf_coef_t              coef,
  input  bc2_cfg_t               bc2_cfg,
  input  zs_cfg_t                zs_cfg,
  output logic [ADC_W-1:0]       vpd,
  // baseline memory write (rclk)
  input  logic                   pm_we,
  input  logic [ADC_W-1:0]       pm_addr,
  input  logic [ADC_W-1:0]       pm_data,
  // block completion
  output logic                   done,
  output logic [AW:0]            nwords40,
  output logic                   ovf,
  // data memory readout (rclk)
  input  logic                   rd_re,
  input  logic [AW-1:0]          rd_addr,
  output logic [MEM_W-1:0]       rd_data,
  // processed samples, for observation
  output logic signed [DP_W-1:0] bc1_out,
  output logic signed [DP_W-1:0] tcf_out,
  output logic [ADC_W-1:0]       bc2_out,
  output logic signed [DP_W-1:0] bsl
);

  logic [ADC_W-1:0] zs_out;
  logic             zs_keep;
  logic             we;
  logic [AW-1:0]    waddr;
  logic [MEM_W-1:0] wdata;

  altro_bc1 u_bc1 (
    .clk(sclk), .rst_n, .din(adc_d), .acq(acq_bc1), .time_idx(time_bc1),
    .cfg(bc1_cfg), .fpd, .vpd, .dout(bc1_out),
    .pm_wclk(rclk), .pm_we, .pm_waddr(pm_addr), .pm_wdata(pm_data)
  );

  altro_tcf u_tcf (.clk(sclk), .rst_n, .din(bc1_out), .coef, .dout(tcf_out));

  altro_bc2 u_bc2 (.clk(sclk), .rst_n, .din(tcf_out), .cfg(bc2_cfg), .dout(bc2_out), .bsl);

  altro_zs u_zs (.clk(sclk), .rst_n, .din(bc2_out), .cfg(zs_cfg), .dout(zs_out), .keep(zs_keep));

  altro_df #(.AW(AW)) u_df (
    .clk(sclk), .rst_n, .din(zs_out), .keep(zs_keep), .win, .time_idx(time_df),
    .hwaddr, .max_words(buf_words), .we, .waddr, .wdata, .done, .nwords40, .ovf
  );

  altro_dmem #(.DEPTH(DEPTH), .WIDTH(MEM_W)) u_dmem (
    .wclk(sclk), .we, .waddr(wr_base + waddr), .wdata,
    .rclk, .re(rd_re), .raddr(rd_addr), .rdata(rd_data)
  );

endmodule
