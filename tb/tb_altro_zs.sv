// tb_altro_zs: self-checking test of the zero suppression flagging.
// The reference works on the whole record: it finds the runs of samples at
// or above threshold, keeps runs of at least glitch+1 samples, widens each by
// pre and post samples, then fills every gap of one or two samples between
// kept samples. dout/keep must show sample n and its flag exactly 11
// cycles after it entered. Random records of noise, single-sample glitches
// and pulses are run for several settings; the test also counts that
// glitches were rejected and clusters merged, and runs with suppression
// disabled.
module tb_altro_zs;
  import altro_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0] din = 0, dout;
  logic keep;
  zs_cfg_t cfg;
  int checks = 0, failures = 0;
  int n_glitch = 0, n_merge = 0;

  altro_zs dut (.clk, .rst_n, .din, .cfg, .dout, .keep);
  always #5 clk = !clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 2000;
  int x [N];
  bit ab [N], cf [N], ff [N], gf [N];

  task automatic make_ref();
    int s, e;
    for (int n = 0; n < N; n++) begin ab[n] = (x[n] >= int'(cfg.thr)); cf[n] = 0; ff[n] = 0; gf[n] = 0; end
    // runs above threshold
    s = 0;
    while (s < N) begin
      if (!ab[s]) begin s++; continue; end
      e = s;
      while (e + 1 < N && ab[e + 1]) e++;
      if (e - s + 1 >= int'(cfg.glitch) + 1) for (int k = s; k <= e; k++) cf[k] = 1;
      else n_glitch++;
      s = e + 1;
    end
    for (int n = 0; n < N; n++)
      if (cf[n])
        for (int k = n - int'(cfg.pre); k <= n + int'(cfg.post); k++)
          if (k >= 0 && k < N) ff[k] = 1;
    for (int n = 0; n < N; n++) gf[n] = ff[n];
    for (int n = 1; n + 1 < N; n++)
      if (!ff[n] && ff[n - 1]) begin
        // gap starting at n: length 1 or 2 is filled
        if (ff[n + 1]) begin gf[n] = 1; n_merge++; end
        else if (n + 2 < N && ff[n + 2]) begin gf[n] = 1; gf[n + 1] = 1; n_merge++; end
      end
    if (!cfg.en) for (int n = 0; n < N; n++) gf[n] = 1;
  endtask

  task automatic run_case();
    for (int n = 0; n < N; n++) begin
      int r;
      r = $urandom_range(0, 99);
      x[n] = $urandom_range(0, 8);
      if (r < 4) x[n] = $urandom_range(20, 200);            // isolated glitch
      else if (r < 8 && n > 3) begin
        x[n] = 300; if (n + 4 < N) begin x[n+1] = 250; x[n+2] = 120; x[n+3] = 40; end
        n += 3;
      end
    end
    make_ref();
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < N + 11; n++) begin
      din = (n < N) ? 10'(x[n]) : 10'd0;
      @(posedge clk); #1;
      if (n >= 10 && n - 10 < N) begin
        checks++;
        if (int'(dout) != x[n - 10] || keep != gf[n - 10]) begin
          failures++;
          if (failures < 10) $display("n=%0d got %0d/%b exp %0d/%b", n - 10, dout, keep, x[n - 10], gf[n - 10]);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    cfg = '{en: 1'b1, thr: 10'd15, glitch: 2'd1, pre: 2'd2, post: 3'd3};
    run_case();
    cfg = '{en: 1'b1, thr: 10'd15, glitch: 2'd0, pre: 2'd0, post: 3'd0};
    run_case();
    cfg = '{en: 1'b1, thr: 10'd100, glitch: 2'd3, pre: 2'd3, post: 3'd7};
    run_case();
    cfg = '{en: 1'b1, thr: 10'd10, glitch: 2'd2, pre: 2'd1, post: 3'd1};
    run_case();
    cfg = '{en: 1'b0, thr: 10'd10, glitch: 2'd2, pre: 2'd1, post: 3'd1};
    run_case();
    checks++;
    if (n_glitch == 0 || n_merge == 0) begin
      failures++; $display("mechanism not exercised: glitch %0d merge %0d", n_glitch, n_merge);
    end
    $display("glitches rejected %0d, merges %0d", n_glitch, n_merge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
