// altro_pkg: types and constants shared by the ALTRO readout chip RTL.
//
// Widths follow the chip: a 10-bit ADC, 11-bit two's complement samples
// between the baseline correction I, tail cancellation and baseline
// correction II stages, 18-bit fixed-point arithmetic inside the tail
// cancellation filter, and 40-bit words in the multi-event data memory and
// on the readout bus. The configuration structs gather the programmable
// settings of each processing stage; their field widths and encodings, the
// trailer layout and the bus command codes are this design's own choices.
package altro_pkg;

  localparam int unsigned NCH       = 16;   // channels per chip
  localparam int unsigned ADC_W     = 10;   // ADC word
  localparam int unsigned DP_W      = 11;   // two's complement samples in BC1..BC2
  localparam int unsigned TCF_W     = 18;   // tail cancellation filter arithmetic
  localparam int unsigned TCF_FRAC  = 7;    // fractional bits added by the padding
  localparam int unsigned COEF_W    = 16;   // K and L coefficients, unsigned fraction
  localparam int unsigned MEM_W     = 40;   // data memory / bus word
  localparam int unsigned MEM_DEPTH = 1024; // data memory words per channel
  localparam int unsigned PED_DEPTH = 1024; // baseline (pedestal) memory words
  localparam int unsigned TIME_W    = 10;   // time stamp / sample counter
  localparam int unsigned CHIP_W    = 8;    // chip address bits
  localparam int unsigned HWADDR_W  = CHIP_W + 4;

  // Baseline Correction I data path selects (see altro_bc1).
  typedef struct packed {
    logic pol;        // 1: invert the ADC code (1023 - din)
    logic addr_time;  // memory address: 1 = sample time, 0 = data
    logic addr_cal;   // data used as address: 1 = din - vpd, 0 = din
    logic plus_mem;   // '+' operand: 1 = memory output, 0 = data
    logic plus_cal;   // data used as '+' operand: 1 = din - vpd, 0 = din
    logic minus_mem;  // '-' operand: 1 = memory output, 0 = fpd
    logic pwsave;     // gate output (and memory) outside the acquisition
  } bc1_cfg_t;

  // Tail cancellation filter coefficients, unsigned fractions of 2**16.
  typedef struct packed {
    logic [COEF_W-1:0] k1, k2, k3, l1, l2, l3;
  } tcf_coef_t;

  // Baseline Correction II settings.
  typedef struct packed {
    logic              en;      // 0: baseline not subtracted (offset and clip only)
    logic [ADC_W-1:0]  thr_hi;  // window above the baseline
    logic [ADC_W-1:0]  thr_lo;  // window below the baseline
    logic [ADC_W-1:0]  offset;  // added after the subtraction
    logic [1:0]        pre;     // samples before a pulse excluded (0..3)
    logic [3:0]        post;    // samples after a pulse excluded (0..15)
  } bc2_cfg_t;

  // Zero suppression settings.
  typedef struct packed {
    logic              en;      // 0: every sample of the window is kept
    logic [ADC_W-1:0]  thr;     // samples >= thr are above threshold
    logic [1:0]        glitch;  // consecutive samples required = glitch + 1
    logic [1:0]        pre;     // pre-samples kept (0..3)
    logic [2:0]        post;    // post-samples kept (0..7)
  } zs_cfg_t;

  // Trigger manager settings.
  typedef struct packed {
    logic [TIME_W-1:0] nsamples; // samples per acquisition (1..1023)
    logic [TIME_W-1:0] delay;    // trigger delay (0..1023)
    logic [3:0]        pretrig;  // pre-trigger samples (0..15)
  } trg_cfg_t;

  // Data format constants.
  localparam logic [ADC_W-1:0] STUFF_WORD = 10'h2AA;
  localparam logic [13:0]      TRL_MARK   = 14'h2AAA;
  localparam logic [3:0]       TRL_MARK2  = 4'hA;

  function automatic logic [MEM_W-1:0] make_trailer(input logic [ADC_W-1:0] nwords,
                                                    input logic [HWADDR_W-1:0] hwaddr);
    return {TRL_MARK, nwords, TRL_MARK2, hwaddr};
  endfunction

  // Hamming-coded states of the bus transaction machine (distance 3 apart).
  localparam logic [5:0] HS_IDLE = 6'b000000;
  localparam logic [5:0] HS_WAIT = 6'b000111;
  localparam logic [5:0] HS_DONE = 6'b011001;

  // Bus command / register codes (address bits [6:0]).
  typedef enum logic [6:0] {
    R_K1 = 7'h00, R_K2 = 7'h01, R_K3 = 7'h02,
    R_L1 = 7'h03, R_L2 = 7'h04, R_L3 = 7'h05,
    R_VFPD = 7'h06, R_PMADD = 7'h07, R_PMDTA = 7'h08, R_VPD = 7'h09,
    R_BC1CFG = 7'h0A, R_BC2THR = 7'h0B, R_BC2CFG = 7'h0C,
    R_ZSTHR = 7'h0D, R_ZSCFG = 7'h0E, R_TRCFG = 7'h0F, R_BUFCFG = 7'h10,
    R_STATUS = 7'h11,
    C_CHRDO = 7'h1A, C_RPINC = 7'h1B, C_SWTRG = 7'h1C, C_L2 = 7'h1D,
    C_ERCLR = 7'h1E
  } bus_code_e;

endpackage
