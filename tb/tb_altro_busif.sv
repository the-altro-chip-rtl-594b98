// tb_altro_busif: self-checking test of the bus interface.
// A bus master writes and reads registers (a simple register file in the
// test answers reg_rdata), checks that other chip addresses are ignored and
// that broadcasts are taken, issues the RPINC / SWTRG / L2 commands and
// checks their toggles, and reads out channels: the words must arrive on
// bd_out with dstb in address order from rd_base, exactly rd_len of them,
// with trsf high around them; an acquisition (acq_busy) raised in the
// middle must stop the words after the synchroniser delay and let them
// resume afterwards. Bit flips injected in the protected machine must be
// reported and the transaction still completed.
module tb_altro_busif;
  import altro_pkg::*;
  localparam int NC = 16;
  logic clk = 0, rst_n = 0, cstb = 0, write = 0;
  logic [39:0] bd_in = 0, bd_out;
  logic bd_oe, ackn, trsf, dstb;
  logic reg_wr, reg_bcast, err_clr, mem_re, empty = 0, acq_busy = 0;
  logic [6:0] reg_code; logic [3:0] reg_ch, mem_ch;
  logic [19:0] reg_wdata, reg_rdata;
  logic [9:0] mem_raddr, rd_base = 10'd256;
  logic [39:0] mem_rdata;
  logic [10:0] rd_len [NC];
  logic rel_t, trg_t, l2_t;
  logic [5:0] seu_flip = 0;
  logic err_single, err_double;
  int checks = 0, failures = 0;
  logic [19:0] regfile [128];
  int n_single = 0, n_double = 0;

  altro_busif dut (.clk, .rst_n, .chip_addr(8'h2C), .cstb, .write, .bd_in, .bd_out, .bd_oe,
    .ackn, .trsf, .dstb, .reg_wr, .reg_code, .reg_ch, .reg_bcast, .reg_wdata, .reg_rdata,
    .err_clr, .mem_re, .mem_ch, .mem_raddr, .mem_rdata, .rd_base, .rd_len, .empty, .acq_busy,
    .cmd_release_tgl(rel_t), .cmd_swtrg_tgl(trg_t), .cmd_l2_tgl(l2_t), .seu_flip,
    .err_single, .err_double);
  always #5 clk = !clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // register file and memory models
  assign reg_rdata = regfile[reg_code];
  always @(posedge clk) begin
    if (reg_wr) regfile[reg_code] <= reg_wdata;
    if (mem_re) mem_rdata <= {4'(mem_ch), 26'h0, mem_raddr};
    n_single += err_single;
    n_double += err_double;
  end

  function automatic logic [39:0] addr(bit b, int chip, int chn, int c, logic [19:0] d);
    return {b, 8'(chip), 4'(chn), 7'(c), d};
  endfunction

  // one transaction; returns 1 when acknowledged
  task automatic xact(logic [39:0] a, bit w, output logic [19:0] rd, output bit acked);
    int t;
    @(negedge clk); bd_in = a; write = w; cstb = 1;
    t = 0; acked = 0;
    while (t < 3000) begin
      @(negedge clk); t++;
      if (ackn) begin acked = 1; break; end
    end
    rd = bd_out[19:0];
    if (acked && !w) begin checks++; if (!bd_oe) begin failures++; $display("bd_oe low on read"); end end
    @(negedge clk); cstb = 0; write = 0;
    repeat (2) @(negedge clk);
  endtask

  int words [$];
  bit busy_seen_words;
  always @(posedge clk) if (dstb) words.push_back(int'(bd_out[9:0]) | (int'(bd_out[39:36]) << 10));

  initial begin
    logic [19:0] rd;
    bit ok;
    logic t0;
    for (int c = 0; c < NC; c++) rd_len[c] = 11'(10 + c);
    for (int i = 0; i < 128; i++) regfile[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // register write and read back
    xact(addr(0, 8'h2C, 3, R_ZSTHR, 20'h00123), 1, rd, ok);
    checks++; if (!ok || regfile[R_ZSTHR] != 20'h123) begin failures++; $display("write failed"); end
    xact(addr(0, 8'h2C, 3, R_ZSTHR, 0), 0, rd, ok);
    checks++; if (!ok || rd != 20'h123) begin failures++; $display("read got %h", rd); end
    // other chip: no acknowledge, no write
    fork
      xact(addr(0, 8'h2D, 3, R_ZSCFG, 20'h00055), 1, rd, ok);
      begin repeat (100) @(negedge clk); cstb = 0; end
    join_any
    disable fork;
    @(negedge clk); cstb = 0; repeat (3) @(negedge clk);
    checks++; if (regfile[R_ZSCFG] == 20'h55) begin failures++; $display("foreign chip write taken"); end
    // broadcast
    xact(addr(1, 8'h00, 0, R_ZSCFG, 20'h00077), 1, rd, ok);
    checks++; if (!ok || regfile[R_ZSCFG] != 20'h77) begin failures++; $display("broadcast failed"); end
    // commands
    t0 = rel_t;
    xact(addr(0, 8'h2C, 0, C_RPINC, 0), 1, rd, ok);
    checks++; if (rel_t == t0) begin failures++; $display("RPINC"); end
    t0 = trg_t;
    xact(addr(0, 8'h2C, 0, C_SWTRG, 0), 1, rd, ok);
    checks++; if (trg_t == t0) begin failures++; $display("SWTRG"); end
    t0 = l2_t;
    xact(addr(0, 8'h2C, 0, C_L2, 0), 1, rd, ok);
    checks++; if (l2_t == t0) begin failures++; $display("L2"); end
    // channel readout
    for (int c = 0; c < NC; c += 5) begin
      words.delete();
      xact(addr(0, 8'h2C, c, C_CHRDO, 0), 1, rd, ok);
      checks++;
      if (!ok || words.size() != 10 + c) begin failures++; $display("ch %0d: %0d words", c, words.size()); end
      foreach (words[i]) begin
        checks++;
        if (words[i] != ((256 + i) | (c << 10))) begin failures++; $display("word %0d = %h", i, words[i]); end
      end
    end
    // readout paused by an acquisition
    rd_len[2] = 11'd200;
    words.delete();
    fork
      xact(addr(0, 8'h2C, 2, C_CHRDO, 0), 1, rd, ok);
      begin
        int during;
        repeat (40) @(negedge clk);
        acq_busy = 1;
        repeat (6) @(negedge clk);
        during = words.size();
        repeat (100) @(negedge clk);
        checks++;
        if (words.size() != during) begin failures++; $display("words during acquisition"); end
        acq_busy = 0;
      end
    join
    checks++;
    if (words.size() != 200) begin failures++; $display("paused readout gave %0d words", words.size()); end
    foreach (words[i]) if (words[i] != ((256 + i) | (2 << 10))) begin failures++; break; end
    // SEU injection during a transaction
    @(negedge clk); bd_in = addr(0, 8'h2C, 0, R_K1, 20'h00042); write = 1; cstb = 1;
    @(negedge clk); seu_flip = 6'b000100; @(negedge clk); seu_flip = 0;
    repeat (5) @(negedge clk);
    checks++; if (!ackn) begin failures++; $display("no ack after single flip"); end
    @(negedge clk); cstb = 0; repeat (3) @(negedge clk);
    @(negedge clk); seu_flip = 6'b110000; @(negedge clk); seu_flip = 0;   // idle -> invalid
    repeat (3) @(negedge clk);
    checks++;
    if (n_single == 0 || n_double == 0) begin failures++; $display("errors not reported %0d %0d", n_single, n_double); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
