// tb_altro_df: self-checking test of the data format stage.
// For random windows of samples with random keep flags the expected block
// is built as a list of 10-bit words (each cluster's samples, then the time
// of its last sample, then its size = samples + 2), padded with 10'h2AA to a
// multiple of four and followed by the trailer {14'h2AAA, word count,
// 4'hA, hardware address}. The memory writes are collected and compared
// word by word; the block is also decoded backwards from the trailer, as a
// reader would, to recover every cluster. done must come with the block
// length, within 7 cycles of the window end. A final case with a small
// buffer checks that the block is cut to fit and ovf is raised.
module tb_altro_df;
  import altro_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0] din = 0, time_idx = 0;
  logic keep = 0, win = 0;
  logic [11:0] hwaddr = 12'h5A3;
  logic [10:0] max_words = 11'd256;
  logic we, done, ovf;
  logic [9:0] waddr;
  logic [39:0] wdata;
  logic [10:0] nwords40;
  int checks = 0, failures = 0;

  altro_df dut (.clk, .rst_n, .din, .keep, .win, .time_idx, .hwaddr, .max_words,
                .we, .waddr, .wdata, .done, .nwords40, .ovf);
  always #5 clk = !clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [39:0] mem [1024];
  int last_wr = -1, done_seen = 0, done_len = 0;
  always @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (done) begin done_seen++; done_len = int'(nwords40); end
  end

  task automatic run_block(int nsamp, int density, bit tiny);
    int words [$];
    int clen, last_t, nw, nexp, cyc;
    bit ink;
    int kp [];
    int xs [];
    kp = new[nsamp];
    xs = new[nsamp];
    for (int i = 0; i < nsamp; i++) begin
      kp[i] = ($urandom_range(0, 99) < density);
      xs[i] = $urandom_range(0, 1023);
    end
    // expected words
    clen = 0; ink = 0;
    for (int i = 0; i <= nsamp; i++) begin
      if (i < nsamp && kp[i]) begin words.push_back(xs[i]); clen++; last_t = i; ink = 1; end
      else if (ink) begin words.push_back(last_t); words.push_back(clen + 2); clen = 0; ink = 0; end
    end
    nw = words.size();
    while (words.size() % 4 != 0) words.push_back(10'h2AA);
    nexp = words.size() / 4 + 1;
    done_seen = 0;
    // drive
    for (int i = 0; i < nsamp; i++) begin
      win = 1; keep = kp[i][0]; din = 10'(xs[i]); time_idx = 10'(i);
      @(posedge clk); #1;
    end
    win = 0; keep = 0;
    cyc = 0;
    while (done_seen == 0 && cyc < 20) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (done_seen != 1 || cyc > 7) begin failures++; $display("done missing/late %0d %0d", done_seen, cyc); end
    repeat (2) @(posedge clk); #1;
    if (tiny) begin
      checks++;
      if (!ovf || done_len > int'(max_words)) begin failures++; $display("overflow not handled len=%0d ovf=%b", done_len, ovf); end
      // trailer at the end and a consistent back-linked structure
      checks++;
      if (mem[done_len - 1][39:26] != 14'h2AAA) begin failures++; $display("no trailer"); end
      return;
    end
    checks++;
    if (done_len != nexp) begin failures++; $display("length %0d exp %0d", done_len, nexp); end
    for (int w = 0; w < nexp - 1; w++) begin
      logic [39:0] e;
      e = {10'(words[4*w+3]), 10'(words[4*w+2]), 10'(words[4*w+1]), 10'(words[4*w])};
      checks++;
      if (mem[w] !== e) begin failures++; if (failures < 10) $display("word %0d got %h exp %h", w, mem[w], e); end
    end
    checks++;
    if (mem[nexp - 1] !== {14'h2AAA, 10'(nw), 4'hA, hwaddr}) begin
      failures++; $display("trailer %h", mem[nexp - 1]);
    end
    // backward decode: from the word count, walk clusters from the end
    begin
      int p, ncl, sz, tm, total;
      logic [9:0] w10 [$];
      for (int w = 0; w < nexp - 1; w++) for (int k = 0; k < 4; k++) w10.push_back(mem[w][10*k +: 10]);
      p = int'(mem[nexp - 1][25:16]) - 1;
      total = 0; ncl = 0;
      while (p > 0) begin
        sz = w10[p]; tm = w10[p - 1];
        // samples occupy p-sz+1 .. p-2, last sample at time tm
        checks++;
        if (!kp[tm] || (tm + 1 < nsamp && kp[tm + 1]) || w10[p - 2] != 10'(xs[tm])) begin
          failures++; $display("decode mismatch at cluster ending %0d", tm);
        end
        total += sz - 2; ncl++;
        p -= sz;
      end
      checks++;
      if (p != -1) begin
        failures++;
        $display("back-links do not reach the start (%0d)", p);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk); #1;
    run_block(100, 30, 0);
    repeat (10) @(posedge clk); #1;
    run_block(1000, 10, 0);
    repeat (10) @(posedge clk); #1;
    run_block(1000, 100, 0);
    repeat (10) @(posedge clk); #1;
    run_block(37, 50, 0);
    repeat (10) @(posedge clk); #1;
    max_words = 11'd16;
    run_block(300, 60, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
