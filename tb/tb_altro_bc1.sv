// tb_altro_bc1: self-checking test of Baseline Correction I.
// A model of the stage (polarity, exponential self-calibration frozen during
// the acquisition, pattern memory addressed by time or value, operand
// selects, 11-bit saturation, power-save gating) predicts every output,
// which is compared 3 cycles after the input (the stage latency). Cases:
// din - fpd, inverted polarity, self-calibrated din - vpd, time-addressed
// pattern subtraction, value-addressed look-up table, test pattern
// injection, and power save outside the acquisition.
module tb_altro_bc1;
  import altro_pkg::*;
  logic clk = 0, rclk = 0, rst_n = 0;
  logic [9:0] din = 0, fpd = 0, vpd;
  logic acq = 0;
  logic [9:0] time_idx = 0;
  bc1_cfg_t cfg = '0;
  logic signed [10:0] dout;
  logic pm_we = 0;
  logic [9:0] pm_waddr = 0, pm_wdata = 0;
  int checks = 0, failures = 0;

  altro_bc1 dut (.clk, .rst_n, .din, .acq, .time_idx, .cfg, .fpd, .vpd, .dout,
                 .pm_wclk(rclk), .pm_we, .pm_waddr, .pm_wdata);
  always #5 clk = !clk;
  always #3 rclk = !rclk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mem [1024];
  int acc = 0;           // self-cal accumulator model
  int expq [$];

  function automatic int pat(int a);
    return (a * 7 + 13) % 1024;
  endfunction

  // model of one sample; the first outputs after a settings change are not
  // compared (samples in flight see the new settings); returns the expected output
  function automatic int model(int d, bit a, int t);
    int dp, vp, dc, ad, plus, minus, r;
    dp = cfg.pol ? 1023 - d : d;
    vp = acc >> 5;
    dc = dp - vp;
    if (!a) acc = acc + dp - (acc >> 5);
    ad = cfg.addr_cal ? ((dc < 0) ? 0 : (dc & 1023)) : dp;
    if (cfg.addr_time) ad = t;
    plus  = cfg.plus_mem  ? mem[ad] : (cfg.plus_cal ? dc : dp);
    minus = cfg.minus_mem ? mem[ad] : int'(fpd);
    r = plus - minus;
    if (r > 1023) r = 1023;
    if (r < -1024) r = -1024;
    if (cfg.pwsave && !a) r = 0;
    return r;
  endfunction

  task automatic drive(int n, int lo, int hi, bit a, int skip = 3);
    for (int i = 0; i < n; i++) begin
      din = 10'($urandom_range(lo, hi));
      acq = a;
      time_idx = 10'(i);
      expq.push_back(model(int'(din), a, i));
      @(posedge clk); #1;
      if (expq.size() > 2) begin
        int e = expq.pop_front();
        if (i >= skip) checks++;
        if (i >= skip && int'(dout) != e) begin
          failures++;
          if (failures < 10) $display("mismatch cfg=%b got %0d exp %0d", cfg, dout, e);
        end
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = pat(i);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // load the pattern memory through the write port
    for (int i = 0; i < 1024; i++) begin
      @(negedge rclk); pm_we = 1; pm_waddr = 10'(i); pm_wdata = 10'(pat(i));
    end
    @(negedge rclk); pm_we = 0;
    @(posedge clk); #1;
    // 1: din - fpd
    fpd = 10'd100; cfg = '0;
    drive(200, 0, 1023, 0);
    // 2: inverted polarity
    cfg.pol = 1; drive(100, 0, 1023, 0); cfg.pol = 0;
    // 3: self-calibration on a drifting baseline, then acquisition din - vpd
    cfg.plus_cal = 1; cfg.minus_mem = 1; cfg.addr_time = 1;
    drive(600, 295, 305, 0, 500);
    checks++;
    if (vpd < 290 || vpd > 310) begin failures++; $display("vpd %0d not near 300", vpd); end
    drive(300, 280, 700, 1);
    // 4: time-addressed pattern subtraction: din - f(t)
    cfg = '0; cfg.addr_time = 1; cfg.minus_mem = 1;
    drive(300, 0, 1023, 1);
    // 5: look-up table f(din) - fpd
    cfg = '0; cfg.plus_mem = 1; fpd = 10'd5;
    drive(300, 0, 1023, 0);
    // 6: test pattern f(t) - fpd, fpd = 0
    cfg = '0; cfg.plus_mem = 1; cfg.addr_time = 1; fpd = 0;
    drive(200, 0, 1023, 1);
    // 7: power save: zeros outside the acquisition
    cfg = '0; cfg.pwsave = 1; fpd = 10'd50;
    drive(100, 0, 1023, 0);
    drive(100, 0, 1023, 1);
    drive(100, 0, 1023, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
