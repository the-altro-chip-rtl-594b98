// tb_altro_regs: self-checking test of the configuration and status
// registers. Every register is written with random data, to one channel and
// by broadcast, and read back through rdata and through the configuration
// outputs; PMADD/PMDTA must produce one pattern-memory write per data word
// at consecutive addresses of the addressed channel only; the status
// register must show the buffer state and count single and double errors
// until cleared.
module tb_altro_regs;
  import altro_pkg::*;
  localparam int NC = 16;
  logic clk = 0, rst_n = 0, wr = 0, bcast = 0;
  logic [6:0] code = 0;
  logic [3:0] ch = 0;
  logic [19:0] wdata = 0, rdata;
  logic [9:0] vpd [NC];
  logic [3:0] nstored = 4'd3;
  logic full = 0, empty = 0, err_single = 0, err_double = 0, err_clr = 0;
  tcf_coef_t coef [NC];
  logic [9:0] fpd [NC];
  bc1_cfg_t bc1_cfg; bc2_cfg_t bc2_cfg; zs_cfg_t zs_cfg; trg_cfg_t trg_cfg;
  logic nbuf8;
  logic [NC-1:0] pm_we;
  logic [9:0] pm_addr, pm_data;
  int checks = 0, failures = 0;

  altro_regs dut (.clk, .rst_n, .wr, .code, .ch, .bcast, .wdata, .rdata, .vpd, .nstored,
    .full, .empty, .err_single, .err_double, .err_clr, .coef, .fpd, .bc1_cfg, .bc2_cfg,
    .zs_cfg, .trg_cfg, .nbuf8, .pm_we, .pm_addr, .pm_data);
  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wreg(bus_code_e c, int chn, bit b, logic [19:0] d);
    @(negedge clk); wr = 1; code = c; ch = 4'(chn); bcast = b; wdata = d;
    @(negedge clk); wr = 0; bcast = 0;
  endtask
  task automatic rcheck(bus_code_e c, int chn, logic [19:0] e);
    @(negedge clk); code = c; ch = 4'(chn); #1;
    checks++;
    if (rdata !== e) begin failures++; $display("reg %s ch %0d got %h exp %h", c.name(), chn, rdata, e); end
  endtask

  initial begin
    logic [15:0] k;
    int wcount, bad;
    for (int c = 0; c < NC; c++) vpd[c] = 10'(c * 3);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // per-channel coefficient registers
    for (int c = 0; c < NC; c++) begin
      k = 16'($urandom);
      wreg(R_K2, c, 0, 20'(k));
      rcheck(R_K2, c, 20'(k));
      checks++; if (coef[c].k2 !== k) begin failures++; $display("coef output"); end
      wreg(R_VFPD, c, 0, 20'(c + 100));
    end
    for (int c = 0; c < NC; c++) rcheck(R_VFPD, c, 20'(c + 100));
    for (int c = 0; c < NC; c++) rcheck(R_VPD, c, 20'(c * 3));
    // broadcast
    wreg(R_L3, 0, 1, 20'h0BEEF);
    for (int c = 0; c < NC; c++) begin
      checks++; if (coef[c].l3 !== 16'hBEEF) begin failures++; $display("broadcast ch %0d", c); end
    end
    // common registers
    wreg(R_BC2THR, 0, 0, {10'd20, 10'd30});
    rcheck(R_BC2THR, 0, {10'd20, 10'd30});
    checks++; if (bc2_cfg.thr_hi != 20 || bc2_cfg.thr_lo != 30) begin failures++; $display("bc2 thr"); end
    wreg(R_ZSCFG, 0, 0, 20'b101_10_11_1);
    checks++; if (zs_cfg.post != 5 || zs_cfg.pre != 2 || zs_cfg.glitch != 3 || !zs_cfg.en) begin failures++; $display("zs cfg"); end
    wreg(R_TRCFG, 0, 0, {10'd7, 10'd500});
    checks++; if (trg_cfg.delay != 7 || trg_cfg.nsamples != 500) begin failures++; $display("trcfg"); end
    wreg(R_BUFCFG, 0, 0, 20'h1A);
    checks++; if (!nbuf8 || trg_cfg.pretrig != 10) begin failures++; $display("bufcfg"); end
    wreg(R_BC1CFG, 0, 0, 20'h55);
    checks++; if (bc1_cfg !== 7'h55) begin failures++; $display("bc1cfg"); end
    // pattern memory writes
    wreg(R_PMADD, 0, 0, 20'd40);
    wcount = 0; bad = 0;
    fork
      begin
        for (int i = 0; i < 10; i++) wreg(R_PMDTA, 5, 0, 20'(i + 7));
        repeat (3) @(negedge clk);
      end
      begin
        repeat (30) begin
          @(posedge clk); #1;
          if (|pm_we) begin
            if (pm_we != 16'h0020 || pm_addr != 10'(40 + wcount) || pm_data != 10'(wcount + 7)) bad++;
            wcount++;
          end
        end
      end
    join
    checks++;
    if (wcount != 10 || bad != 0) begin failures++; $display("pattern writes %0d bad %0d", wcount, bad); end
    // status
    @(negedge clk); err_single = 1; repeat (3) @(negedge clk); err_single = 0;
    err_double = 1; @(negedge clk); err_double = 0; full = 1;
    rcheck(R_STATUS, 0, {2'b00, 6'd1, 6'd3, 1'b0, 1'b1, 4'd3});
    @(negedge clk); err_clr = 1; @(negedge clk); err_clr = 0;
    rcheck(R_STATUS, 0, {2'b00, 6'd0, 6'd0, 1'b0, 1'b1, 4'd3});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
