// tb_altro_workloads: the memory sizing the chip is built for, run on the
// full-size top (16 channels, 1024 x 40 data memory per channel).
//
// Workload 1: four complete 1000-sample acquisitions without zero
// suppression, one per buffer in the 4-buffer mode. Workload 2: eight
// 500-sample acquisitions (fewer than 512) in the 8-buffer mode. Baseline
// correction II and zero suppression are disabled and BC1 subtracts
// nothing, so every stored sample must equal the ADC code of its analog
// input exactly: the inputs carry a deterministic sawtooth per channel that
// the testbench predicts. For each event and channel the block is read out
// and checked: one cluster of all the samples, its time stamp (last sample)
// and size, every sample value, the word count in the trailer, the number
// of 40-bit words read (data, stuffing and trailer), no overflow. The
// memory write rate is checked too: while the acquisition window is open, a
// channel writes at most one 40-bit word every four sampling clocks.
module tb_altro_workloads;
  import altro_pkg::*;
  localparam int NC = 16;
  localparam int P = 3;
  localparam logic [7:0] CHIP = 8'h2C;

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
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- analog sawtooth: code(c, k) = 50 + (k * (3 + c) + 40 * c) mod 900
  int k = 0;
  function automatic int code_of(int c, int kk);
    return 50 + ((kk * (3 + c) + 40 * c) % 900);
  endfunction
  always @(negedge sclk)
    for (int c = 0; c < NC; c++) begin
      real x;
      x = (real'(code_of(c, k + 1)) + 0.5) / 512.0 - 1.0;
      vin[c] = 1.0 + x / 2.0;
      vinb[c] = 1.0 - x / 2.0;
    end
  always @(posedge sclk) k <= k + 1;

  // ---- write-rate monitor (channel data writes while the window is open)
  int last_we [NC];
  int n_close = 0, n_writes = 0, scyc = 0;
  always @(posedge sclk) scyc <= scyc + 1;
  for (genvar c = 0; c < NC; c++) begin : g_mon
    always @(posedge sclk)
      if (dut.g_ch[c].u_ch.we && dut.win) begin
        n_writes++;
        if (scyc - last_we[c] < 4) n_close++;
        last_we[c] = scyc;
      end
  end

  // ---- bus
  logic [39:0] rx [$];
  always @(posedge rclk) if (dstb) rx.push_back(bd_out);
  function automatic logic [39:0] baddr(bit b, int chn, int c, logic [19:0] d);
    return {b, CHIP, 4'(chn), 7'(c), d};
  endfunction
  task automatic wr(bit b, int chn, bus_code_e c, logic [19:0] d);
    int t;
    @(negedge rclk); bd_in = baddr(b, chn, c, d); write = 1; cstb = 1;
    t = 0;
    while (!ackn && t < 5000) begin @(negedge rclk); t++; end
    if (t >= 5000) failures++;
    @(negedge rclk); cstb = 0; write = 0;
    @(negedge rclk);
  endtask

  int trig_k [$];
  task automatic event_l1_l2();
    @(posedge sclk); #1;
    trig_k.push_back(k);
    l1 = 1;
    @(posedge sclk); #1 l1 = 0;
    while (dut.busy) @(posedge sclk);
    #1 l2 = 1; @(posedge sclk); #1 l2 = 0;
    repeat (3) @(posedge sclk);
  endtask

  // read the oldest event of every channel and check it; ns samples
  task automatic check_oldest(int ns, int ev);
    for (int c = 0; c < NC; c++) begin
      logic [9:0] w10 [$];
      int nw, exp40, bad;
      rx.delete();
      wr(0, c, C_CHRDO, 0);
      repeat (4) @(negedge rclk);
      exp40 = (ns + 2 + 3) / 4 + 1;
      checks++;
      if (rx.size() != exp40) begin
        failures++; $display("ev %0d ch %0d: %0d words read, expected %0d", ev, c, rx.size(), exp40);
        continue;
      end
      nw = int'(rx[exp40 - 1][25:16]);
      checks++;
      if (rx[exp40 - 1][39:26] != 14'h2AAA || nw != ns + 2 || rx[exp40 - 1][11:0] != {CHIP, 4'(c)}) begin
        failures++; $display("ev %0d ch %0d: trailer %h", ev, c, rx[exp40 - 1]);
        continue;
      end
      for (int i = 0; i + 1 < exp40; i++) for (int q = 0; q < 4; q++) w10.push_back(rx[i][10*q +: 10]);
      checks++;
      if (w10[nw - 1] != 10'(ns + 2) || w10[nw - 2] != 10'(ns - 1)) begin
        failures++; $display("ev %0d ch %0d: size %0d time %0d", ev, c, w10[nw - 1], w10[nw - 2]);
      end
      bad = 0;
      for (int i = 0; i < ns; i++)
        if (int'(w10[i]) != code_of(c, trig_k[ev] - 4 - P + i)) begin
          if (bad < 3) $display("ev %0d ch %0d sample %0d: %0d expected %0d", ev, c, i, w10[i],
                                code_of(c, trig_k[ev] - 4 - P + i));
          bad++;
        end
      checks++;
      if (bad != 0) failures++;
      for (int i = nw; i < 4 * (exp40 - 1); i++) begin
        checks++;
        if (w10[i] != STUFF_WORD) begin failures++; $display("stuffing %h", w10[i]); end
      end
      checks++;
      if (dut.ch_ovf[c]) begin failures++; $display("ev %0d ch %0d overflow", ev, c); end
    end
    wr(0, 0, C_RPINC, 0);
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin vin[c] = 1.0; vinb[c] = 1.0; last_we[c] = -100; end
    repeat (3) @(posedge sclk);
    #1 rst_n = 1;
    repeat (3) @(posedge rclk);
    wr(0, 0, R_BC1CFG, 0);                           // din - fpd
    wr(1, 0, R_VFPD, 0);
    wr(1, 0, R_K1, 0); wr(1, 0, R_K2, 0); wr(1, 0, R_K3, 0);
    wr(1, 0, R_L1, 0); wr(1, 0, R_L2, 0); wr(1, 0, R_L3, 0);
    wr(0, 0, R_BC2CFG, 0);                           // no baseline subtraction
    wr(0, 0, R_ZSCFG, 0);                            // no zero suppression
    // ---- workload 1: 4 x 1000 samples
    wr(0, 0, R_TRCFG, {10'd0, 10'd1000});
    wr(0, 0, R_BUFCFG, 20'(P));
    for (int e = 0; e < 4; e++) event_l1_l2();
    checks++;
    if (!full || dut.nstored != 4) begin failures++; $display("4 x 1000: stored %0d", dut.nstored); end
    for (int e = 0; e < 4; e++) check_oldest(1000, e);
    // ---- workload 2: 8 x 500 samples
    wr(0, 0, R_TRCFG, {10'd0, 10'd500});
    wr(0, 0, R_BUFCFG, 20'(16 + P));
    for (int e = 0; e < 8; e++) event_l1_l2();
    checks++;
    if (!full || dut.nstored != 8) begin failures++; $display("8 x 500: stored %0d", dut.nstored); end
    for (int e = 0; e < 8; e++) check_oldest(500, 4 + e);
    // ---- write rate
    checks++;
    if (n_close != 0 || n_writes == 0) begin
      failures++; $display("%0d of %0d writes closer than four clocks", n_close, n_writes);
    end
    $display("memory writes in the window %0d, none closer than four clocks: %0d", n_writes, n_close == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
