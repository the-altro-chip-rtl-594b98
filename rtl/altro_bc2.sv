// altro_bc2: Baseline Correction II, a moving-average baseline restorer.
//
// After the tail cancellation the signal sits on a baseline that can still
// wander (pick-up, non-systematic effects). This stage keeps an estimate bsl
// of the baseline and an acceptance window around it, from bsl - thr_lo to
// bsl + thr_hi. Samples inside the window feed an 8-tap moving average
// (a FIR with an accumulator: acc += new - oldest, bsl = acc / 8); samples
// outside it - a pulse - are excluded, so during a pulse bsl stays
// constant. The control logic also excludes a programmable number of
// samples before (pre, 0..3) and after (post, 0..15) every out-of-window
// sample. At start-up (after reset) it forces a quick convergence: every
// sample is averaged, whatever the window, until eight consecutive samples
// have fallen inside the window; only then is the exclusion applied. If
// RELOCK consecutive samples fall outside the window (the baseline has
// stepped, e.g. after the stages in front were reconfigured), the start-up
// is run again, so the estimate cannot stay locked out. Each sample
// is then corrected with the current bsl, a programmable offset is added,
// and the result is clipped to 0..1023 (anything below the baseline
// becomes 0 unless the offset lifts it).
//
// Timing: the window test is made on the incoming sample; the sample reaches
// the average four cycles later (so the decision can look four samples
// ahead), the subtraction one cycle after that, and dout is registered:
// dout is valid 6 clk edges after din. The window, the 8-tap average, the
// 4-cycle control delay, the widths (11-bit in, 10-bit thresholds and
// offset, 10-bit out) follow the chip. That a sample is accepted when it is
// strictly inside both thresholds, the pre/post ranges, the exact
// start-up rule and the re-start after RELOCK samples are this design's
// choices.
module altro_bc2
  import altro_pkg::*;
#(
  parameter int unsigned RELOCK = 256    // out-of-window run that restarts start-up
)
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [DP_W-1:0] din,
  input  bc2_cfg_t               cfg,
  output logic [ADC_W-1:0]       dout,
  output logic signed [DP_W-1:0] bsl
);

  localparam int unsigned HIST = 4 + 1 + 15;   // flags kept: 4 ahead, 15 post

  logic signed [DP_W-1:0] dl [5];        // dl[k]: din delayed k+1 cycles
  logic [HIST-1:0]        of;            // of[k]: sample dl[k] was outside
  logic signed [DP_W+2:0] acc;
  logic signed [DP_W-1:0] mab [8];
  logic [3:0]             nfill;         // start-up: in-window samples in a row
  logic                   conv;          // start-up over, window applied
  logic [$clog2(RELOCK+1)-1:0] nout;     // out-of-window samples in a row
  logic [3:0]             vld;           // delay line filled since reset

  // ---- double threshold
  logic signed [DP_W+1:0] hi, lo;
  logic                   outside;
  always_comb begin
    hi = (DP_W+2)'(bsl) + (DP_W+2)'($signed({1'b0, cfg.thr_hi}));
    lo = (DP_W+2)'(bsl) - (DP_W+2)'($signed({1'b0, cfg.thr_lo}));
    outside = !(((DP_W+2)'(din) < hi) && ((DP_W+2)'(din) > lo));
  end

  // ---- control logic: exclusion of the sample entering the average (dl[3])
  logic en;
  always_comb begin
    en = !of[3];
    for (int j = 1; j <= 3; j++)
      if (j <= int'(cfg.pre) && of[3-j]) en = 1'b0;
    for (int j = 1; j <= 15; j++)
      if (j <= int'(cfg.post) && of[3+j]) en = 1'b0;
    if (!conv) en = 1'b1;
    if (!vld[3]) en = 1'b0;          // delay line not yet filled after reset
  end

  assign bsl = DP_W'(acc >>> 3);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < 5; k++) dl[k] <= '0;
      for (int k = 0; k < 8; k++) mab[k] <= '0;
      of    <= '0;
      vld   <= '0;
      acc   <= '0;
      nfill <= '0;
      conv  <= 1'b0;
      nout  <= '0;
    end else begin
      // start-up: every sample is averaged until eight consecutive samples
      // have fallen inside the window
      if (vld[3] && !conv) begin
        if (of[3]) nfill <= '0;
        else begin
          nfill <= nfill + 4'd1;
          if (nfill == 4'd7) conv <= 1'b1;
        end
      end
      // lost lock: a long run outside the window restarts the start-up
      if (!vld[3] || !of[3]) nout <= '0;
      else if (int'(nout) == int'(RELOCK) - 1) begin
        nout  <= '0;
        conv  <= 1'b0;
        nfill <= '0;
      end else nout <= nout + 1'b1;
      dl[0] <= din;
      for (int k = 1; k < 5; k++) dl[k] <= dl[k-1];
      of  <= {of[HIST-2:0], outside};
      vld <= {vld[2:0], 1'b1};
      // moving average filter
      if (en) begin
        acc    <= acc + (DP_W+3)'(dl[3]) - (DP_W+3)'(mab[7]);
        mab[0] <= dl[3];
        for (int k = 1; k < 8; k++) mab[k] <= mab[k-1];
      end
    end

  // ---- correction, offset and clipping
  logic signed [DP_W+2:0] corr;
  always_comb begin
    corr = (DP_W+3)'(dl[4]) + (DP_W+3)'($signed({1'b0, cfg.offset}));
    if (cfg.en) corr = corr - (DP_W+3)'(bsl);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)            dout <= '0;
    else if (corr < 0)     dout <= '0;
    else if (corr > 1023)  dout <= 10'd1023;
    else                   dout <= corr[ADC_W-1:0];

endmodule
