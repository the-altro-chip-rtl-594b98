// tb_altro_channel: end-to-end test of one acquisition channel.
// ADC codes (a flat pedestal of 50 with pulses and single-sample glitches)
// feed the channel; altro_trigman supplies the window (pretrigger 3, 200
// samples). With BC1 subtracting fpd = 50, the filter coefficients at zero
// and the baseline restorer on, every processed sample equals code - 50.
// The block written to the data memory is read back on the readout clock
// and compared word by word with a block built by the test from the raw
// codes: zero suppression (threshold, 2-sample glitch filter, 2 pre and
// 3 post samples, merging of gaps under three), cluster time stamp and
// size, stuffing and trailer. This also checks the 21-cycle processor
// latency, because the window must select exactly the right samples.
module tb_altro_channel;
  import altro_pkg::*;
  logic sclk = 0, rclk = 0, rst_n = 0, l1 = 0;
  logic [9:0] adc_d = 10'd50;
  logic acq_bc1, win, trig_acc, busy;
  logic [9:0] time_bc1, time_df;
  trg_cfg_t trg_cfg = '{nsamples: 10'd200, delay: 10'd0, pretrig: 4'd3};
  bc1_cfg_t bc1_cfg = '0;
  bc2_cfg_t bc2_cfg = '{en: 1'b1, thr_hi: 10'd5, thr_lo: 10'd5, offset: 10'd0, pre: 2'd1, post: 4'd3};
  zs_cfg_t zs_cfg = '{en: 1'b1, thr: 10'd10, glitch: 2'd1, pre: 2'd2, post: 3'd3};
  tcf_coef_t coef = '0;
  logic [9:0] vpd;
  logic done, ovf, rd_re = 0;
  logic [10:0] nwords40;
  logic [9:0] rd_addr = 0;
  logic [39:0] rd_data;
  logic signed [10:0] bc1_out, tcf_out, bsl;
  logic [9:0] bc2_out;
  int checks = 0, failures = 0;

  altro_trigman u_trig (.clk(sclk), .rst_n, .l1, .full(1'b0), .cfg(trg_cfg), .trig_acc, .busy,
                        .acq_bc1, .time_bc1, .win, .time_df);
  altro_channel dut (.sclk, .rclk, .rst_n, .adc_d, .acq_bc1, .time_bc1, .win, .time_df,
    .hwaddr(12'h123), .wr_base(10'd256), .buf_words(11'd256), .bc1_cfg, .fpd(10'd50), .coef,
    .bc2_cfg, .zs_cfg, .vpd, .pm_we(1'b0), .pm_addr(10'd0), .pm_data(10'd0), .done,
    .nwords40, .ovf, .rd_re, .rd_addr, .rd_data, .bc1_out, .tcf_out, .bc2_out, .bsl);
  always #5 sclk = !sclk;
  always #4 rclk = !rclk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NS = 600;
  int code [NS];
  int len_done = 0;
  always @(posedge sclk) if (done) len_done = int'(nwords40);

  initial begin
    int tcyc, first, words [$], nw, ab [NS], cf [NS], ff [NS], gf [NS], x [NS];
    int ink, clen, last_t;
    logic [39:0] e;
    for (int n = 0; n < NS; n++) code[n] = 50;
    for (int p = 0; p < 8; p++) begin
      int t0;
      t0 = 230 + p * 37 + (p % 3) * 5;
      code[t0] += 60; code[t0 + 1] += 200; code[t0 + 2] += 130; code[t0 + 3] += 70;
      code[t0 + 4] += 30; code[t0 + 5] += 12;
    end
    code[300] += 80;     // glitch
    code[420] += 40;
    repeat (2) @(posedge sclk);
    #1 rst_n = 1;
    // drive the codes; trigger at cycle 240
    for (int n = 0; n < NS; n++) begin
      adc_d = 10'(code[n]);
      l1 = (n == 240);
      if (n == 240) tcyc = n;
      @(posedge sclk); #1;
    end
    // expected block: samples n = tcyc+1-3 .. +199
    first = tcyc + 1 - 3;
    // suppression flags over the whole record, then the window is cut out
    for (int i = 0; i < NS; i++) begin x[i] = code[i] - 50; ab[i] = x[i] >= 10; cf[i] = 0; ff[i] = 0; end
    for (int i = 0; i < NS; i++) cf[i] = ab[i] && ((i > 0 && ab[i-1]) || (i < NS - 1 && ab[i+1]));
    for (int i = 0; i < NS; i++) if (cf[i]) for (int k = i - 2; k <= i + 3; k++) if (k >= 0 && k < NS) ff[k] = 1;
    for (int i = 0; i < NS; i++) gf[i] = ff[i];
    for (int i = 1; i + 1 < NS; i++)
      if (!ff[i] && ff[i-1]) begin
        if (ff[i+1]) gf[i] = 1;
        else if (i + 2 < NS && ff[i+2]) begin gf[i] = 1; gf[i+1] = 1; end
      end
    ink = 0; clen = 0;
    for (int i = 0; i <= 200; i++) begin
      if (i < 200 && gf[first + i]) begin words.push_back(x[first + i]); clen++; last_t = i; ink = 1; end
      else if (ink) begin words.push_back(last_t); words.push_back(clen + 2); clen = 0; ink = 0; end
    end
    nw = words.size();
    while (words.size() % 4) words.push_back(10'h2AA);
    checks++;
    if (len_done != words.size() / 4 + 1) begin failures++; $display("block length %0d exp %0d", len_done, words.size() / 4 + 1); end
    for (int w = 0; w <= words.size() / 4; w++) begin
      @(negedge rclk); rd_re = 1; rd_addr = 10'(256 + w);
      @(negedge rclk); rd_re = 0;
      if (w < words.size() / 4) e = {10'(words[4*w+3]), 10'(words[4*w+2]), 10'(words[4*w+1]), 10'(words[4*w])};
      else e = {14'h2AAA, 10'(nw), 4'hA, 12'h123};
      checks++;
      if (rd_data !== e) begin failures++; if (failures < 10) $display("word %0d got %h exp %h", w, rd_data, e); end
    end
    checks++;
    if (ovf) begin failures++; $display("unexpected overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
