// tb_altro_bc2: self-checking test of Baseline Correction II.
// The reference is written per sample index n: sample n is outside when it
// is not strictly inside (bsl(n) - thr_lo, bsl(n) + thr_hi); sample n-4 is
// accepted at time n when it and the pre/post neighbours are inside (or,
// at start-up, until 8 consecutive samples were inside); bsl(n) is the floor of the mean
// of the last 8 accepted samples (zeros before the first); the output of
// sample n appears 6 cycles later as clip(x(n) - bsl(n+5) + offset). The
// stimulus is a slowly drifting baseline with noise, large pulses and a
// pick-up bump. Also checked: the baseline holds still during a pulse, and
// the restored baseline sits at the offset.
module tb_altro_bc2;
  import altro_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [10:0] din = 0, bsl;
  logic [9:0] dout;
  bc2_cfg_t cfg;
  int checks = 0, failures = 0;

  altro_bc2 dut (.clk, .rst_n, .din, .cfg, .dout, .bsl);
  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 3000;
  int x [N + 8];
  int outf [N + 8];
  int bs [N + 8];
  int acc_list [$];
  int nacc = 0, nin = 0;
  bit conv = 0;
  int pulse_hold_checks = 0, baseline_ok = 0;

  function automatic int mean8();
    int s = 0;
    for (int i = 0; i < 8; i++) s += acc_list[acc_list.size() - 1 - i];
    return (s >= 0) ? s / 8 : -((-s + 7) / 8);   // floor
  endfunction

  initial begin
    // a start-up transient: the first samples are far from the baseline
    cfg = '{en: 1'b1, thr_hi: 10'd6, thr_lo: 10'd6, offset: 10'd5, pre: 2'd2, post: 4'd5};
    for (int i = 0; i < 8; i++) acc_list.push_back(0);
    // stimulus
    for (int n = 0; n < N + 8; n++) begin
      real b;
      b = 100.0 + 20.0 * $sin(real'(n) / 400.0);
      x[n] = int'(b) + $urandom_range(0, 4) - 2;
      if (n < 3) x[n] = -50;
      if (n % 300 > 150 && n % 300 < 170) x[n] += 300 - 14 * (n % 300 - 150);
      if (n % 700 > 500 && n % 700 < 520) x[n] += 6;      // small bump
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < N; n++) begin
      bs[n] = mean8();
      outf[n] = !((x[n] < bs[n] + int'(cfg.thr_hi)) && (x[n] > bs[n] - int'(cfg.thr_lo)));
      if (n >= 4) begin
        int m;
        bit ok;
        m = n - 4;
        ok = !outf[m];
        for (int j = 1; j <= int'(cfg.pre); j++)  if (outf[m + j]) ok = 0;
        for (int j = 1; j <= int'(cfg.post); j++) if (m - j >= 0 && outf[m - j]) ok = 0;
        if (!conv) begin
          ok = 1;
          if (!outf[m]) begin nin++; if (nin == 8) conv = 1; end
          else nin = 0;
        end
        if (ok) begin acc_list.push_back(x[m]); nacc++; end
      end
      din = 11'(x[n]);
      @(posedge clk); #1;
      checks++;
      if (int'(bsl) != mean8()) begin
        failures++;
        if (failures < 10) $display("bsl n=%0d got %0d exp %0d", n, bsl, mean8());
      end
      if (n >= 6) begin
        int m, e;
        m = n - 5;                     // output now is sample n-5, bsl of time n-5+5
        e = x[m] - bs[n] + int'(cfg.offset);
        if (e < 0) e = 0;
        if (e > 1023) e = 1023;
        checks++;
        if (int'(dout) != e) begin
          failures++;
          if (failures < 10) $display("dout n=%0d got %0d exp %0d", m, dout, e);
        end
        if (m > 500 && !outf[m] && m % 300 < 140 && dout >= 1 && dout <= 11) baseline_ok++;
      end
      if (n % 300 > 160 && n % 300 < 168 && n > 300) begin
        pulse_hold_checks++;
        checks++;
        if (bs[n] != bs[n - 1]) begin failures++; $display("baseline moved during pulse at %0d", n); end
      end
    end
    checks++;
    if (baseline_ok < 1000) begin failures++; $display("restored baseline not at offset (%0d)", baseline_ok); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
