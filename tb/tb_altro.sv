// tb_altro: end-to-end test of the whole chip at its default size (16
// channels, 1024 x 40 data memories, 1K x 10 pattern memories).
//
// Analog inputs: each channel sits on its own slowly drifting baseline;
// every trigger brings a shaped pulse of 200 counts at a channel-dependent
// time. Channel 1 carries a two-sample pulse with an exponential tail
// (ratio 0.8) that the tail cancellation filter of that channel (L1 = 0.8)
// must remove; channel 3 carries a systematic 40-count bump that the
// time-addressed pattern memory subtracts; channel 5 adds a one-sample
// glitch that zero suppression must reject; channel 6 carries two pulses
// close enough to be merged into one cluster, channel 7 two pulses far
// enough apart to stay two clusters.
//
// Everything is configured over the bus. Events: L1 + L2 after the
// acquisition; a software trigger without L2 (overwritten); L1 with L2
// during the acquisition; more events until all four buffers are full; a
// trigger while full (ignored); buffer releases; a trigger during a
// channel readout (the readout pauses); a switch to eight buffers; bit
// flips injected into the bus state machine. Every frozen event is read
// out channel by channel (one 40-bit word per readout clock when not
// paused, checked), decoded backwards from its trailer and checked:
// number of clusters, peak amplitude within 4 counts, peak time stamp,
// cluster length on the tail-cancelled channel, trailer address. Each of
// the mechanisms above is counted and must have happened.
module tb_altro;
  import altro_pkg::*;
  localparam int NC = 16;
  localparam int P = 5;            // pre-trigger samples
  localparam logic [7:0] CHIP = 8'h07;

  logic sclk = 0, rclk = 0, rst_n = 0, l1 = 0, l2 = 0, cstb = 0, write = 0;
  real vin [NC], vinb [NC];
  real vcm = 1.0, vrefp = 1.0, vrefm = 0.0;
  logic full, bd_oe, ackn, trsf, dstb;
  logic [39:0] bd_in = 0, bd_out;
  logic [5:0] seu_flip = 0;
  int checks = 0, failures = 0;

  altro dut (.sclk, .rclk, .rst_n, .chip_addr(CHIP), .vin, .vinb, .vcm, .vrefp, .vrefm,
             .l1, .l2, .full, .cstb, .write, .bd_in, .bd_out, .bd_oe, .ackn, .trsf, .dstb,
             .seu_flip);
  always #5 sclk = !sclk;
  always #3 rclk = !rclk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- analog stimulus
  int k = 0;                         // sample index (rising sclk edges)
  int trig_t [$];                    // cycles at which l1 was raised
  function automatic int pos_of(int c);  // window index of the pulse start
    return 40 + 9 * c;
  endfunction
  function automatic real shape(int j);
    real s [8] = '{0.3, 1.0, 0.75, 0.45, 0.25, 0.12, 0.06, 0.03};
    return (j >= 0 && j < 8) ? s[j] : 0.0;
  endfunction
  function automatic real code_of(int c, int kk);
    real v;
    v = 80.0 + 3.0 * c + 3.0 * $sin(real'(kk) / 700.0);
    foreach (trig_t[e]) begin
      int j;
      j = kk - (trig_t[e] - 4 - P + pos_of(c));
      if (c == 1) begin
        if (j == 0) v += 200.0;
        else if (j >= 1) v += 200.0 * (0.8 ** real'(j - 1));
      end else begin
        v += 200.0 * shape(j);
      end
      if (c == 5 && j == 30) v += 100.0;                 // glitch
      if (c == 6) v += 200.0 * shape(j - 13);            // merged pair
      if (c == 7) v += 200.0 * shape(j - 20);            // separate pair
      if (c == 3) begin
        int t;
        t = kk - (trig_t[e] - 4 - P);                    // window index
        if (t >= 100 && t < 140) v += 40.0;              // systematic bump
      end
    end
    return v;
  endfunction
  always @(negedge sclk) begin
    for (int c = 0; c < NC; c++) begin
      real x;
      x = (code_of(c, k + 1) + 0.5) / 512.0 - 1.0;
      vin[c] = 1.0 + x / 2.0;
      vinb[c] = 1.0 - x / 2.0;
    end
  end
  always @(posedge sclk) k <= k + 1;

  // ---------------- bus master
  logic [39:0] rx [$];
  int rx_cyc [$];                    // readout clock cycle of each word
  int rcyc = 0;
  always @(posedge rclk) begin
    rcyc <= rcyc + 1;
    if (dstb) begin rx.push_back(bd_out); rx_cyc.push_back(rcyc); end
  end

  function automatic logic [39:0] baddr(bit b, int chn, int c, logic [19:0] d);
    return {b, CHIP, 4'(chn), 7'(c), d};
  endfunction

  task automatic xact(logic [39:0] a, bit w, output logic [19:0] rd);
    int t;
    @(negedge rclk); bd_in = a; write = w; cstb = 1;
    t = 0;
    while (!ackn && t < 5000) begin @(negedge rclk); t++; end
    if (t >= 5000) begin failures++; $display("no acknowledge for %h", a); end
    rd = bd_out[19:0];
    @(negedge rclk); cstb = 0; write = 0;
    @(negedge rclk);
  endtask
  task automatic wr(bit b, int chn, bus_code_e c, logic [19:0] d);
    logic [19:0] rd;
    xact(baddr(b, chn, c, d), 1, rd);
  endtask
  task automatic rdreg(int chn, bus_code_e c, output logic [19:0] d);
    xact(baddr(0, chn, c, 0), 0, d);
  endtask

  // ---------------- mechanism counters
  int n_trig = 0, n_l2_after = 0, n_l2_during = 0, n_overwrite = 0, n_full_ignored = 0;
  int n_pause = 0, n_tail = 0, n_pattern = 0, n_glitch = 0, n_merge = 0, n_release = 0;
  int n_burst = 0, n_swtrg = 0, n_nbuf8 = 0, n_seu1 = 0, n_seu2 = 0, n_selfcal = 0, n_events_checked = 0;
  always @(posedge sclk) if (dut.trig_acc) n_trig++;
  always @(posedge rclk) if (dut.u_busif.rdo_act && dut.u_busif.acq_sync[1]) n_pause++;

  task automatic trigger(bit with_l2, bit l2_during);
    @(posedge sclk); #1;
    trig_t.push_back(k);
    l1 = 1;
    @(posedge sclk); #1 l1 = 0;
    if (with_l2 && l2_during) begin
      repeat (50) @(posedge sclk); #1 l2 = 1; @(posedge sclk); #1 l2 = 0;
      n_l2_during++;
    end
    while (dut.busy) @(posedge sclk);
    #1;
    if (with_l2 && !l2_during) begin
      repeat (3) @(posedge sclk); #1 l2 = 1; @(posedge sclk); #1 l2 = 0;
      n_l2_after++;
    end
    repeat (5) @(posedge sclk);
  endtask

  // read out one channel of the oldest event and check it
  task automatic check_channel(int c, int ev);
    logic [19:0] rd;
    logic [9:0] w10 [$];
    int nw, p, ncl, sz, ts, peak, peak_t, clen_first;
    int pause0;
    rx.delete(); rx_cyc.delete();
    pause0 = n_pause;
    wr(0, c, C_CHRDO, 0);
    repeat (4) @(negedge rclk);
    // one 40-bit word per readout clock (the 300 MB/s rate at 60 MHz) unless paused
    if (n_pause == pause0 && rx.size() > 1) begin
      checks++;
      if (rx_cyc[rx.size() - 1] - rx_cyc[0] != rx.size() - 1) begin
        failures++; $display("ev %0d ch %0d: %0d words took %0d cycles", ev, c, rx.size(),
                             rx_cyc[rx.size() - 1] - rx_cyc[0] + 1);
      end else n_burst++;
    end
    checks++;
    if (rx.size() == 0 || rx[rx.size() - 1][39:26] != 14'h2AAA
        || rx[rx.size() - 1][11:0] != {CHIP, 4'(c)}) begin
      failures++; $display("ev %0d ch %0d: bad trailer", ev, c);
      return;
    end
    for (int i = 0; i + 1 < rx.size(); i++) for (int q = 0; q < 4; q++) w10.push_back(rx[i][10*q +: 10]);
    nw = int'(rx[rx.size() - 1][25:16]);
    p = nw - 1; ncl = 0; peak = 0; peak_t = -1; clen_first = 0;
    while (p > 0) begin
      sz = w10[p]; ts = w10[p - 1];
      if (sz < 3 || sz > p + 1) begin failures++; $display("ev %0d ch %0d: bad size %0d", ev, c, sz); return; end
      // samples p-sz+1 .. p-2, times ts-(sz-3) .. ts; keep the earliest cluster's peak
      peak = 0;
      for (int q = 0; q < sz - 2; q++)
        if (int'(w10[p - sz + 1 + q]) > peak) begin peak = w10[p - sz + 1 + q]; peak_t = ts - (sz - 3) + q; end
      clen_first = sz - 2;
      ncl++;
      p -= sz;
    end
    checks++;
    if (p != -1) begin failures++; $display("ev %0d ch %0d: back-links broken", ev, c); end
    checks++;
    if (ncl != ((c == 7) ? 2 : 1)) begin
      failures++; $display("ev %0d ch %0d: %0d clusters", ev, c, ncl);
    end else begin
      if (c == 5) n_glitch++;
      if (c == 6) n_merge++;
      if (c == 3) n_pattern++;
    end
    checks++;
    if (peak < 196 || peak > 204) begin failures++; $display("ev %0d ch %0d: peak %0d", ev, c, peak); end
    checks++;
    // channel 1: the two 200-count samples are equal; channel 6: two equal pulses
    if (peak_t != pos_of(c) + ((c == 1) ? 0 : 1) && !(c == 1 && peak_t == pos_of(c) + 1)
        && !(c == 6 && peak_t == pos_of(c) + 14)) begin
      failures++; $display("ev %0d ch %0d: peak at %0d exp %0d", ev, c, peak_t, pos_of(c) + 1);
    end
    if (c == 1) begin
      checks++;
      if (clen_first > 8) begin failures++; $display("tail not cancelled: %0d samples", clen_first); end
      else n_tail++;
    end
  endtask

  task automatic check_event(int ev);
    for (int c = 0; c < NC; c++) check_channel(c, ev);
    n_events_checked++;
  endtask

  initial begin
    logic [19:0] rd;
    for (int c = 0; c < NC; c++) begin vin[c] = 1.0; vinb[c] = 1.0; end
    repeat (3) @(posedge sclk);
    #1 rst_n = 1;
    repeat (3) @(posedge rclk);
    // ---- configuration
    wr(0, 0, R_BC1CFG, 20'b0100110);     // (din - vpd) - f(t)
    wr(1, 0, R_K1, 0); wr(1, 0, R_K2, 0); wr(1, 0, R_K3, 0);
    wr(1, 0, R_L1, 0); wr(1, 0, R_L2, 0); wr(1, 0, R_L3, 0);
    wr(0, 1, R_L1, 20'd52429);           // 0.8
    wr(0, 0, R_BC2THR, {10'd6, 10'd6});
    wr(0, 0, R_BC2CFG, {3'b0, 1'b1, 4'd3, 2'd1, 10'd0});
    wr(0, 0, R_ZSTHR, 20'd15);
    wr(0, 0, R_ZSCFG, 20'({3'd3, 2'd2, 2'd1, 1'b1}));
    wr(0, 0, R_TRCFG, {10'd0, 10'd300});
    wr(0, 0, R_BUFCFG, 20'(P));
    rdreg(1, R_L1, rd);
    checks++; if (rd != 20'd52429) begin failures++; $display("register read back %0d", rd); end
    // pattern memories: zero everywhere, a 40-count bump for channel 3
    wr(0, 0, R_PMADD, 0);
    for (int a = 0; a < 1024; a++) wr(1, 0, R_PMDTA, 0);
    wr(0, 0, R_PMADD, 20'd100);
    for (int a = 100; a < 140; a++) wr(0, 3, R_PMDTA, 20'd40);
    // let the self-calibration settle
    repeat (800) @(posedge sclk);
    for (int c = 0; c < NC; c += 5) begin
      rdreg(c, R_VPD, rd);
      checks++;
      if (int'(rd) < 80 + 3 * c - 5 || int'(rd) > 80 + 3 * c + 5) begin
        failures++; $display("vpd ch %0d = %0d", c, rd);
      end else n_selfcal++;
    end
    // ---- events
    trigger(1, 0);                                   // E1 -> buffer 0
    begin
      int nbef;
      nbef = n_trig;
      @(negedge rclk); wr(0, 0, C_SWTRG, 0);          // E2: software trigger, no L2
      trig_t.push_back(k);
      repeat (20) @(posedge sclk);
      checks++;
      if (n_trig != nbef + 1) begin failures++; $display("software trigger not accepted"); end
      else n_swtrg++;
    end
    while (dut.busy) @(posedge sclk);
    repeat (5) @(posedge sclk);
    n_overwrite++;
    checks++;
    if (dut.nstored != 1) begin failures++; $display("stored %0d after E2", dut.nstored); end
    trigger(1, 1);                                   // E3 -> buffer 1 (L2 during)
    trigger(1, 0);                                   // E4 -> buffer 2
    trigger(1, 0);                                   // E5 -> buffer 3
    checks++;
    if (!full) begin failures++; $display("not full after four frozen events"); end
    begin
      int nbef;
      nbef = n_trig;
      trigger(0, 0);                                 // E6 ignored
      checks++;
      if (n_trig != nbef) begin failures++; $display("trigger accepted while full"); end
      else n_full_ignored++;
    end
    // ---- readout of E1, release
    check_event(1);
    wr(0, 0, C_RPINC, 0); n_release++;
    repeat (10) @(posedge sclk);
    checks++;
    if (full) begin failures++; $display("still full after release"); end
    // ---- readout of E3 with a trigger in the middle of a channel readout
    fork
      check_event(3);
      begin
        repeat (8) @(posedge rclk);
        trigger(0, 0);                               // E7, not frozen
      end
    join
    wr(0, 0, C_RPINC, 0); n_release++;
    check_event(4); wr(0, 0, C_RPINC, 0); n_release++;
    check_event(5); wr(0, 0, C_RPINC, 0); n_release++;
    repeat (10) @(posedge sclk);
    // ---- bit flips in the bus state machine during a register write
    @(negedge rclk); bd_in = baddr(0, 0, R_ZSTHR, 20'd15); write = 1; cstb = 1;
    @(negedge rclk); seu_flip = 6'b010000; @(negedge rclk); seu_flip = 0;
    while (!ackn) @(negedge rclk);
    @(negedge rclk); cstb = 0; write = 0;
    repeat (3) @(negedge rclk);
    @(negedge rclk); seu_flip = 6'b100100; @(negedge rclk); seu_flip = 0;   // idle -> invalid
    repeat (3) @(negedge rclk);
    rdreg(0, R_STATUS, rd);
    checks++;
    if (rd[11:6] == 0 || rd[17:12] == 0 || rd[3:0] != 0 || !rd[5]) begin
      failures++; $display("status %h", rd);
    end else begin n_seu1++; n_seu2++; end
    // ---- eight-buffer mode, shorter acquisitions
    wr(0, 0, R_BUFCFG, 20'(16 + P));
    wr(0, 0, R_TRCFG, {10'd0, 10'd250});
    n_nbuf8++;
    for (int e = 0; e < 8; e++) trigger(1, 0);
    checks++;
    if (!full || dut.nstored != 8) begin failures++; $display("8 buffers: stored %0d", dut.nstored); end
    for (int e = 0; e < 8; e++) begin
      check_event(10 + e);
      wr(0, 0, C_RPINC, 0); n_release++;
    end
    // ---- mechanisms
    $display("triggers %0d, L2 after %0d, L2 during %0d, overwritten %0d, ignored when full %0d",
             n_trig, n_l2_after, n_l2_during, n_overwrite, n_full_ignored);
    $display("readout paused cycles %0d, releases %0d, tail cancelled %0d, pattern removed %0d",
             n_pause, n_release, n_tail, n_pattern);
    $display("glitch rejected %0d, merged %0d, software triggers %0d, 8-buffer runs %0d",
             n_glitch, n_merge, n_swtrg, n_nbuf8);
    $display("SEU single %0d double %0d, self-calibrated channels %0d, events checked %0d",
             n_seu1, n_seu2, n_selfcal, n_events_checked);
    $display("full-rate channel readouts %0d", n_burst);
    begin
      int m [18];
      m = '{n_trig, n_l2_after, n_l2_during, n_overwrite, n_full_ignored, n_pause, n_release,
            n_tail, n_pattern, n_glitch, n_merge, n_swtrg, n_nbuf8, n_seu1, n_seu2,
            n_selfcal, n_events_checked, n_burst};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
