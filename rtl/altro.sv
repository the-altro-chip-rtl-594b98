// altro: the ALTRO readout chip - 16 channels of A/D conversion, digital
// signal conditioning, zero suppression and multi-event buffering for gas
// detector pads.
//
// Each of the NCH_P channels has an ADC (behavioural model altro_adc) and an
// acquisition channel (altro_channel: baseline correction I, tail
// cancellation, baseline correction II, zero suppression, data format and
// data memory), all running on the sampling clock sclk. The common control
// logic holds the trigger manager (acquisition window from the Level-1
// trigger), the memory manager (buffer allocation, Level-2 freezing, full),
// the configuration and status registers and the bus interface, which runs
// on the independent readout clock rclk and answers a 40-bit bus.
//
// Interface: vin/vinb are each channel's differential analog input, set
// against vrefp/vrefm; l1/l2 are the trigger inputs (rising edge, sclk
// domain); cstb, write, bd_in, bd_out/bd_oe, ackn, trsf and dstb form the
// bus (see altro_busif; BD is split into an input and an output with an
// enable); chip_addr is the geographical chip address; full reports that
// all buffers hold frozen events. seu_flip injects bit flips into the
// protected bus state machine for testing and is tied to zero in use.
// Software triggers and the buffer release reach the sampling clock through
// toggle synchronisers; configuration is quasi-static (changed only while
// no acquisition runs).
module altro
  import altro_pkg::*;
#(
  parameter int unsigned NCH_P = NCH,
  parameter int unsigned DEPTH = MEM_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic               sclk,
  input  logic               rclk,
  input  logic               rst_n,
  input  logic [CHIP_W-1:0]  chip_addr,
  // analog
  input  real                vin  [NCH_P],
  input  real                vinb [NCH_P],
  input  real                vcm,
  input  real                vrefp,
  input  real                vrefm,
  // triggers
  input  logic               l1,
  input  logic               l2,
  output logic               full,
  // bus
  input  logic               cstb,
  input  logic               write,
  input  logic [MEM_W-1:0]   bd_in,
  output logic [MEM_W-1:0]   bd_out,
  output logic               bd_oe,
  output logic               ackn,
  output logic               trsf,
  output logic               dstb,
  input  logic [5:0]         seu_flip
);

  // ---------------- configuration and status
  tcf_coef_t        coef [NCH_P];
  logic [ADC_W-1:0] fpd  [NCH_P];
  logic [ADC_W-1:0] vpd  [NCH_P];
  bc1_cfg_t         bc1_cfg;
  bc2_cfg_t         bc2_cfg;
  zs_cfg_t          zs_cfg;
  trg_cfg_t         trg_cfg;
  logic             nbuf8;
  logic [NCH_P-1:0] pm_we;
  logic [ADC_W-1:0] pm_addr, pm_data;

  logic             reg_wr, reg_bcast, err_clr, err_single, err_double;
  logic [6:0]       reg_code;
  logic [3:0]       reg_ch;
  logic [19:0]      reg_wdata, reg_rdata;

  // ---------------- buffers and triggers
  logic             empty, trig_acc, busy, acq_bc1, win;
  logic [3:0]       nstored;
  logic [TIME_W-1:0] time_bc1, time_df;
  logic [AW-1:0]    wr_base, rd_base;
  logic [AW:0]      buf_words;
  logic [AW:0]      rd_len   [NCH_P];
  logic [AW:0]      ch_nwords[NCH_P];
  logic [NCH_P-1:0] ch_done, ch_ovf;
  logic [2:0]       wbuf, rbuf;

  logic             rel_tgl, swtrg_tgl, l2c_tgl, rel_p, swtrg_p, l2c_p;

  // ---------------- readout
  logic             mem_re;
  logic [3:0]       mem_ch;
  logic [AW-1:0]    mem_raddr;
  logic [MEM_W-1:0] ch_rdata [NCH_P];
  logic [MEM_W-1:0] mem_rdata;

  altro_regs #(.NCH_P(NCH_P)) u_regs (
    .clk(rclk), .rst_n, .wr(reg_wr), .code(reg_code), .ch(reg_ch), .bcast(reg_bcast),
    .wdata(reg_wdata), .rdata(reg_rdata), .vpd, .nstored, .full, .empty,
    .err_single, .err_double, .err_clr, .coef, .fpd, .bc1_cfg, .bc2_cfg, .zs_cfg,
    .trg_cfg, .nbuf8, .pm_we, .pm_addr, .pm_data
  );

  altro_busif #(.NCH_P(NCH_P), .AW(AW)) u_busif (
    .clk(rclk), .rst_n, .chip_addr, .cstb, .write, .bd_in, .bd_out, .bd_oe, .ackn,
    .trsf, .dstb, .reg_wr, .reg_code, .reg_ch, .reg_bcast, .reg_wdata, .reg_rdata,
    .err_clr, .mem_re, .mem_ch, .mem_raddr, .mem_rdata, .rd_base, .rd_len, .empty,
    .acq_busy(busy), .cmd_release_tgl(rel_tgl), .cmd_swtrg_tgl(swtrg_tgl),
    .cmd_l2_tgl(l2c_tgl), .seu_flip, .err_single, .err_double
  );

  altro_tgl_sync u_sync_rel (.clk(sclk), .rst_n, .tgl_in(rel_tgl),   .pulse(rel_p));
  altro_tgl_sync u_sync_trg (.clk(sclk), .rst_n, .tgl_in(swtrg_tgl), .pulse(swtrg_p));
  altro_tgl_sync u_sync_l2  (.clk(sclk), .rst_n, .tgl_in(l2c_tgl),   .pulse(l2c_p));

  altro_trigman u_trig (
    .clk(sclk), .rst_n, .l1(l1 || swtrg_p), .full, .cfg(trg_cfg), .trig_acc, .busy,
    .acq_bc1, .time_bc1, .win, .time_df
  );

  altro_memman #(.NCH_P(NCH_P), .DEPTH(DEPTH)) u_mm (
    .clk(sclk), .rst_n, .nbuf8, .trig_acc, .acq_busy(busy), .l2(l2 || l2c_p),
    .release_buf(rel_p), .ch_done, .ch_nwords, .full, .empty, .nstored, .wr_base,
    .buf_words, .rd_base, .rd_len, .wbuf, .rbuf
  );

  // ---------------- channels
  for (genvar c = 0; c < int'(NCH_P); c++) begin : g_ch
    logic [ADC_W-1:0]       adc_d;
    logic signed [DP_W-1:0] bc1_out, tcf_out, bsl;
    logic [ADC_W-1:0]       bc2_out;

    altro_adc u_adc (
      .sclk, .vin(vin[c]), .vinb(vinb[c]), .vcm, .vrefp, .vrefm, .d(adc_d)
    );

    altro_channel #(.DEPTH(DEPTH)) u_ch (
      .sclk, .rclk, .rst_n, .adc_d, .acq_bc1, .time_bc1, .win, .time_df,
      .hwaddr({chip_addr, 4'(c)}), .wr_base, .buf_words,
      .bc1_cfg, .fpd(fpd[c]), .coef(coef[c]), .bc2_cfg, .zs_cfg, .vpd(vpd[c]),
      .pm_we(pm_we[c]), .pm_addr, .pm_data,
      .done(ch_done[c]), .nwords40(ch_nwords[c]), .ovf(ch_ovf[c]),
      .rd_re(mem_re && mem_ch == 4'(c)), .rd_addr(mem_raddr), .rd_data(ch_rdata[c]),
      .bc1_out, .tcf_out, .bc2_out, .bsl
    );
  end

  assign mem_rdata = ch_rdata[mem_ch];

endmodule
