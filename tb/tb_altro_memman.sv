// tb_altro_memman: self-checking test of the multi-event memory manager.
// A random sequence of acquisitions (each with or without a Level-2, given
// during or after the acquisition), buffer releases and both partitionings
// is applied. A reference keeps a queue of frozen buffers: L2 freezes the
// last acquisition, no L2 lets the next one overwrite it, a trigger while
// full is not counted, a release frees the oldest. Checked after every
// step: stored count, full, empty, the write buffer base, the read buffer
// base and the per-channel block length recorded for the read buffer.
module tb_altro_memman;
  import altro_pkg::*;
  localparam int NC = 2;
  logic clk = 0, rst_n = 0, nbuf8 = 0, trig_acc = 0, acq_busy = 0, l2 = 0, release_buf = 0;
  logic [NC-1:0] ch_done = 0;
  logic [10:0] ch_nwords [NC];
  logic full, empty;
  logic [3:0] nstored;
  logic [9:0] wr_base, rd_base;
  logic [10:0] buf_words;
  logic [10:0] rd_len [NC];
  logic [2:0] wbuf, rbuf;
  int checks = 0, failures = 0;
  int n_full = 0, n_overwrite = 0, n_l2_during = 0;

  altro_memman #(.NCH_P(NC)) dut (.clk, .rst_n, .nbuf8, .trig_acc, .acq_busy, .l2,
    .release_buf, .ch_done, .ch_nwords, .full, .empty, .nstored, .wr_base, .buf_words,
    .rd_base, .rd_len, .wbuf, .rbuf);
  always #5 clk = !clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int q_buf [$];     // frozen buffers, oldest first
  int q_len [$];
  int wb = 0;
  int nb;

  task automatic check(string what);
    int eb;
    eb = nbuf8 ? 128 : 256;
    checks++;
    if (int'(nstored) != q_buf.size() || full != (q_buf.size() == nb) || empty != (q_buf.size() == 0)
        || int'(wr_base) != wb * eb || (q_buf.size() > 0 && (int'(rd_base) != q_buf[0] * eb
        || int'(rd_len[0]) != q_len[0] || int'(rd_len[1]) != q_len[0] + 1))) begin
      failures++;
      if (failures < 10) $display("%s: n=%0d/%0d full=%b wr=%0d/%0d rd=%0d len=%0d", what, nstored,
                                  q_buf.size(), full, wr_base, wb * eb, rd_base, rd_len[0]);
    end
  endtask

  task automatic acquisition(int l2mode);    // 0 none, 1 during, 2 after
    int len;
    if (full) begin n_full++; return; end
    len = $urandom_range(1, 100);
    @(negedge clk); trig_acc = 1; acq_busy = 1;
    @(negedge clk); trig_acc = 0;
    repeat (5) @(negedge clk);
    if (l2mode == 1) begin l2 = 1; @(negedge clk); l2 = 0; n_l2_during++; end
    ch_nwords[0] = 11'(len); ch_nwords[1] = 11'(len + 1); ch_done = '1;
    @(negedge clk); ch_done = 0;
    repeat (3) @(negedge clk);
    acq_busy = 0;
    repeat (3) @(negedge clk);
    if (l2mode == 2) begin l2 = 1; @(negedge clk); l2 = 0; repeat (2) @(negedge clk); end
    if (l2mode != 0) begin
      q_buf.push_back(wb); q_len.push_back(len);
      wb = (wb + 1) % nb;
    end else n_overwrite++;
    check("acquisition");
  endtask

  task automatic release_one();
    @(negedge clk); release_buf = 1;
    @(negedge clk); release_buf = 0;
    if (q_buf.size() > 0) begin void'(q_buf.pop_front()); void'(q_len.pop_front()); end
    @(negedge clk);
    check("release");
  endtask

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      nbuf8 = pass[0];
      nb = nbuf8 ? 8 : 4;
      rst_n = 0; q_buf.delete(); q_len.delete(); wb = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      check("reset");
      for (int i = 0; i < 300; i++) begin
        int r;
        r = $urandom_range(0, 9);
        if (r < 6) acquisition($urandom_range(0, 2));
        else release_one();
      end
      while (q_buf.size() > 0) release_one();
    end
    checks++;
    if (n_full == 0 || n_overwrite == 0 || n_l2_during == 0) begin
      failures++; $display("not exercised: full %0d overwrite %0d l2 %0d", n_full, n_overwrite, n_l2_during);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
