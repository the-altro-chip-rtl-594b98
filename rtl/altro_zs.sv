// altro_zs: Zero Suppression flagging.
//
// With the baseline flat, a fixed threshold separates pulses from noise.
// This block does not drop samples itself: it delays the stream by a fixed
// latency and marks each sample with keep, which the data format stage uses
// to pack only the kept samples. A sample is kept when
//   - it belongs to a run of at least glitch+1 consecutive samples at or
//     above thr (glitch filter: shorter runs are rejected as impulsive
//     noise),
//   - or it lies within pre samples before or post samples after such a run
//     (pre- and post-samples preserve the pulse shape),
//   - or it fills a gap of one or two samples between two kept sets (cluster
//     merger: each set costs two extra words, so sets closer than three
//     samples are joined).
// With en low every sample is kept.
//
// Timing: three pipelined passes - glitch (looking 3 samples ahead), pre/post
// (3 ahead, 7 back) and merge (2 ahead, 2 back) - give a fixed latency of
// 11 clk edges from din to dout/keep. The three features and the 11-cycle
// latency follow the chip; the ranges of glitch, pre and post, the >=
// comparison and the exact merge distance are this design's choices.
module altro_zs
  import altro_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ADC_W-1:0]   din,
  input  zs_cfg_t            cfg,
  output logic [ADC_W-1:0]   dout,
  output logic               keep
);

  logic [ADC_W-1:0] dly [11];   // dly[k]: din delayed k+1 cycles
  logic [6:0]       a;          // a[k]: sample dly[k] at or above threshold
  logic [10:0]      c;          // confirmed (glitch-filtered) samples
  logic [4:0]       f;          // with pre/post samples

  // glitch filter for the sample in a[3]: some run of G=glitch+1 samples
  // containing it is entirely above threshold
  logic c_new;
  always_comb begin
    c_new = 1'b0;
    for (int j = 0; j < 4; j++) begin         // run ends at sample a[3-j]
      logic run;
      run = (j <= int'(cfg.glitch));
      for (int i = 0; i < 4; i++)
        if (i <= int'(cfg.glitch) && !a[3-j+i]) run = 1'b0;
      if (run) c_new = 1'b1;
    end
  end

  // pre/post extension for the sample in c[3]
  logic f_new;
  always_comb begin
    f_new = c[3];
    for (int j = 1; j <= 3; j++)
      if (j <= int'(cfg.pre) && c[3-j]) f_new = 1'b1;
    for (int j = 1; j <= 7; j++)
      if (j <= int'(cfg.post) && c[3+j]) f_new = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < 11; k++) dly[k] <= '0;
      a <= '0;
      c <= '0;
      f <= '0;
    end else begin
      dly[0] <= din;
      for (int k = 1; k < 11; k++) dly[k] <= dly[k-1];
      a <= {a[5:0], din >= cfg.thr};
      c <= {c[9:0], c_new};
      f <= {f[3:0], f_new};
    end

  // cluster merger for the sample in f[2]: fill gaps of one or two samples
  assign dout = dly[10];
  assign keep = !cfg.en || f[2] || (f[3] && f[1]) || (f[3] && f[0]) || (f[4] && f[1]);

endmodule
