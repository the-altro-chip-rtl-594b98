// altro_regs: configuration and status registers.
//
// Holds the programmable settings of the data processor. Per channel: the
// six tail cancellation coefficients K1..K3, L1..L3 and the fixed pedestal
// fpd. Common to all channels: the Baseline Correction I selects, the
// Baseline Correction II thresholds and settings, the zero suppression
// threshold and settings, the acquisition length and trigger delay, the
// pre-trigger count and the 4/8 buffer choice. PMADD/PMDTA write the
// baseline pattern memory of the addressed channel: PMADD sets the memory
// address, each PMDTA write stores a word there and advances the address.
// The status register reports the buffer state and counts the single and
// double bit flips seen in the protected state machine (ERCLR clears them);
// R_VPD reads a channel's self-calibrated pedestal.
//
// Registers sit in the readout clock domain and are written one per cycle
// with wr; a broadcast write goes to every channel. The sampling-clock logic
// uses them directly: they are meant to be changed only while no
// acquisition runs. rdata is combinational. Register contents follow the
// parameters the chip makes programmable; addresses and bit layouts are this
// design's choices (see bus_code_e in altro_pkg).
module altro_regs
  import altro_pkg::*;
#(
  parameter int unsigned NCH_P = NCH
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr,
  input  logic [6:0]             code,
  input  logic [3:0]             ch,
  input  logic                   bcast,
  input  logic [19:0]            wdata,
  output logic [19:0]            rdata,
  // status inputs
  input  logic [ADC_W-1:0]       vpd [NCH_P],
  input  logic [3:0]             nstored,
  input  logic                   full,
  input  logic                   empty,
  input  logic                   err_single,
  input  logic                   err_double,
  input  logic                   err_clr,
  // configuration outputs
  output tcf_coef_t              coef [NCH_P],
  output logic [ADC_W-1:0]       fpd  [NCH_P],
  output bc1_cfg_t               bc1_cfg,
  output bc2_cfg_t               bc2_cfg,
  output zs_cfg_t                zs_cfg,
  output trg_cfg_t               trg_cfg,
  output logic                   nbuf8,
  output logic [NCH_P-1:0]       pm_we,
  output logic [ADC_W-1:0]       pm_addr,
  output logic [ADC_W-1:0]       pm_data
);

  logic [5:0] n_single, n_double;

  logic hit [NCH_P];
  always_comb
    for (int c = 0; c < int'(NCH_P); c++) hit[c] = wr && (bcast || ch == 4'(c));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int c = 0; c < int'(NCH_P); c++) begin
        coef[c] <= '0;
        fpd[c]  <= '0;
      end
      bc1_cfg  <= '0;
      bc2_cfg  <= '{en: 1'b1, thr_hi: 10'd8, thr_lo: 10'd8, offset: '0, pre: 2'd2, post: 4'd4};
      zs_cfg   <= '{en: 1'b1, thr: 10'd3, glitch: 2'd1, pre: 2'd2, post: 3'd3};
      trg_cfg  <= '{nsamples: 10'd1000, delay: '0, pretrig: '0};
      nbuf8    <= 1'b0;
      pm_we    <= '0;
      pm_addr  <= '0;
      pm_data  <= '0;
      n_single <= '0;
      n_double <= '0;
    end else begin
      pm_we <= '0;
      for (int c = 0; c < int'(NCH_P); c++)
        if (hit[c])
          case (code)
            R_K1:    coef[c].k1 <= wdata[15:0];
            R_K2:    coef[c].k2 <= wdata[15:0];
            R_K3:    coef[c].k3 <= wdata[15:0];
            R_L1:    coef[c].l1 <= wdata[15:0];
            R_L2:    coef[c].l2 <= wdata[15:0];
            R_L3:    coef[c].l3 <= wdata[15:0];
            R_VFPD:  fpd[c]     <= wdata[9:0];
            R_PMDTA: pm_we[c]   <= 1'b1;
            default: ;
          endcase
      if (wr)
        case (code)
          R_PMADD:  pm_addr <= wdata[9:0];
          R_PMDTA:  pm_data <= wdata[9:0];
          R_BC1CFG: bc1_cfg <= wdata[6:0];
          R_BC2THR: begin bc2_cfg.thr_hi <= wdata[19:10]; bc2_cfg.thr_lo <= wdata[9:0]; end
          R_BC2CFG: begin
            bc2_cfg.offset <= wdata[9:0];
            bc2_cfg.pre    <= wdata[11:10];
            bc2_cfg.post   <= wdata[15:12];
            bc2_cfg.en     <= wdata[16];
          end
          R_ZSTHR:  zs_cfg.thr <= wdata[9:0];
          R_ZSCFG:  begin
            zs_cfg.en     <= wdata[0];
            zs_cfg.glitch <= wdata[2:1];
            zs_cfg.pre    <= wdata[4:3];
            zs_cfg.post   <= wdata[7:5];
          end
          R_TRCFG:  begin trg_cfg.delay <= wdata[19:10]; trg_cfg.nsamples <= wdata[9:0]; end
          R_BUFCFG: begin trg_cfg.pretrig <= wdata[3:0]; nbuf8 <= wdata[4]; end
          default: ;
        endcase
      // address auto-increment one cycle after the data write
      if (|pm_we) pm_addr <= pm_addr + 1'b1;
      // status counters (saturating)
      if (err_clr) begin
        n_single <= '0;
        n_double <= '0;
      end else begin
        if (err_single && n_single != '1) n_single <= n_single + 1'b1;
        if (err_double && n_double != '1) n_double <= n_double + 1'b1;
      end
    end

  always_comb begin
    rdata = '0;
    case (code)
      R_K1:     rdata = 20'(coef[ch].k1);
      R_K2:     rdata = 20'(coef[ch].k2);
      R_K3:     rdata = 20'(coef[ch].k3);
      R_L1:     rdata = 20'(coef[ch].l1);
      R_L2:     rdata = 20'(coef[ch].l2);
      R_L3:     rdata = 20'(coef[ch].l3);
      R_VFPD:   rdata = 20'(fpd[ch]);
      R_VPD:    rdata = 20'(vpd[ch]);
      R_PMADD:  rdata = 20'(pm_addr);
      R_BC1CFG: rdata = 20'(bc1_cfg);
      R_BC2THR: rdata = {bc2_cfg.thr_hi, bc2_cfg.thr_lo};
      R_BC2CFG: rdata = {3'b000, bc2_cfg.en, bc2_cfg.post, bc2_cfg.pre, bc2_cfg.offset};
      R_ZSTHR:  rdata = 20'(zs_cfg.thr);
      R_ZSCFG:  rdata = 20'({zs_cfg.post, zs_cfg.pre, zs_cfg.glitch, zs_cfg.en});
      R_TRCFG:  rdata = {trg_cfg.delay, trg_cfg.nsamples};
      R_BUFCFG: rdata = 20'({nbuf8, trg_cfg.pretrig});
      R_STATUS: rdata = {2'b00, n_double, n_single, empty, full, nstored};
      default:  rdata = '0;
    endcase
  end

endmodule
