// tb_altro_trigman: self-checking test of the trigger manager.
// For several pre-trigger, delay and length settings a Level-1 pulse is
// given and the cycles are counted: the window must open exactly
// LAT_DP + 1 - pretrig + delay cycles after the trigger cycle and last
// nsamples cycles, time_df must count 0..nsamples-1 inside it, acq_bc1 must
// cover the first sample after the trigger up to the last window sample at
// the processor input, and time_bc1 must equal the window index there.
// Triggers during a running acquisition and while full are ignored.
module tb_altro_trigman;
  import altro_pkg::*;
  localparam int LAT = 21;
  logic clk = 0, rst_n = 0, l1 = 0, full = 0;
  trg_cfg_t cfg;
  logic trig_acc, busy, acq_bc1, win;
  logic [9:0] time_bc1, time_df;
  int checks = 0, failures = 0;

  altro_trigman #(.LAT_DP(LAT)) dut (.clk, .rst_n, .l1, .full, .cfg, .trig_acc, .busy,
                                     .acq_bc1, .time_bc1, .win, .time_df);
  always #5 clk = !clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int p, int d, int n);
    int t, wstart, wlen, bad_time, bad_bc1, acc_cnt;
    cfg = '{nsamples: 10'(n), delay: 10'(d), pretrig: 4'(p)};
    @(posedge clk); #1;
    l1 = 1;                         // trigger cycle is t = 0
    #1;
    checks++;
    if (!trig_acc) begin failures++; $display("trigger not accepted"); end
    @(posedge clk); #1; l1 = 0;
    t = 1; wstart = -1; wlen = 0; bad_time = 0; bad_bc1 = 0; acc_cnt = 0;
    while (busy && t < 3000) begin
      if (t == 5) begin l1 = 1; #1; acc_cnt += trig_acc; end   // must be ignored
      if (t == 6) l1 = 0;
      if (win) begin
        if (wstart < 0) wstart = t;
        if (int'(time_df) != wlen) bad_time++;
        wlen++;
      end
      // acq_bc1 expected for processor-input cycles 1 .. (window end - LAT - 1)
      if (acq_bc1 != (t >= 1 && t < LAT + 1 - p + d + n - LAT)) bad_bc1++;
      if (acq_bc1 && int'(time_bc1) != ((t - (1 - p + d)) & 1023)) bad_bc1++;
      @(posedge clk); #1; t++;
    end
    checks++;
    if (wstart != LAT + 1 - p + d) begin failures++; $display("window at %0d exp %0d", wstart, LAT + 1 - p + d); end
    checks++;
    if (wlen != n) begin failures++; $display("window length %0d exp %0d", wlen, n); end
    checks++;
    if (bad_time != 0 || bad_bc1 != 0) begin failures++; $display("time/acq errors %0d %0d", bad_time, bad_bc1); end
    checks++;
    if (acc_cnt != 0) begin failures++; $display("trigger accepted while busy"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    one(0, 0, 100);
    one(15, 0, 1000);
    one(5, 30, 200);
    one(3, 1023, 10);
    // full: no trigger accepted
    full = 1;
    @(posedge clk); #1 l1 = 1;
    #1;
    checks++;
    if (trig_acc) begin failures++; $display("trigger accepted while full"); end
    @(posedge clk); #1 l1 = 0;
    repeat (5) @(posedge clk); #1;
    checks++;
    if (busy || win) begin failures++; $display("acquisition started while full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
