// altro_memman: central multi-event memory manager.
//
// The data memory of every channel is split into NBUF equal buffers, four
// (1000-sample acquisitions) or eight (acquisitions shorter than 512
// samples) as chosen by nbuf8. All channels use the same buffer for the
// same acquisition. The buffers form a ring: an accepted Level-1 trigger
// writes the acquisition into buffer wbuf; a Level-2 trigger freezes it
// (wbuf advances and the number of stored events grows), and without a
// Level-2 the next acquisition overwrites the same buffer. A Level-2 that
// arrives while the acquisition is still being written is remembered and
// applied when it ends. When every buffer holds a frozen event, full is
// raised and the trigger manager ignores further triggers. The readout side
// reads buffer rbuf, the oldest frozen event; release frees it. The block
// length each channel wrote (done/nwords pulses from the data format) is
// kept per channel and buffer and offered as rd_len for the readout.
//
// Everything runs on the sampling clock. release must be a one-cycle pulse
// in this domain. The outputs read by the readout clock domain (rd_base,
// rd_len, empty) change only on release, L2 or the end of an acquisition.
// Buffer partitioning, L2 freezing, overwrite without L2 and the full rule
// follow the chip; the ring organisation, the deferred L2 and the
// per-buffer length table are this design's choices.
module altro_memman
  import altro_pkg::*;
#(
  parameter int unsigned NCH_P = NCH,
  parameter int unsigned DEPTH = MEM_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   nbuf8,      // 1: 8 buffers, 0: 4 buffers
  input  logic                   trig_acc,   // accepted L1
  input  logic                   acq_busy,   // acquisition running
  input  logic                   l2,
  input  logic                   release_buf,
  input  logic [NCH_P-1:0]       ch_done,
  input  logic [AW:0]            ch_nwords [NCH_P],
  output logic                   full,
  output logic                   empty,
  output logic [3:0]             nstored,
  output logic [AW-1:0]          wr_base,
  output logic [AW:0]            buf_words,
  output logic [AW-1:0]          rd_base,
  output logic [AW:0]            rd_len [NCH_P],
  output logic [2:0]             wbuf,
  output logic [2:0]             rbuf
);

  logic [2:0]  nb_mask;
  logic [3:0]  nbuf;
  assign nbuf      = nbuf8 ? 4'd8 : 4'd4;
  assign nb_mask   = nbuf8 ? 3'b111 : 3'b011;
  assign buf_words = nbuf8 ? (AW+1)'(DEPTH / 8) : (AW+1)'(DEPTH / 4);
  assign wr_base   = AW'(wbuf) * AW'(buf_words);
  assign rd_base   = AW'(rbuf) * AW'(buf_words);
  assign full      = (nstored == nbuf);
  assign empty     = (nstored == 0);

  logic [AW:0] len [NCH_P][8];
  always_comb
    for (int c = 0; c < int'(NCH_P); c++) rd_len[c] = len[c][rbuf];

  logic l2_d, l2_edge, busy_d, acq_end;
  logic have_last;      // a completed, not yet frozen acquisition is in wbuf
  logic l2_pend;        // L2 seen while the acquisition runs
  assign l2_edge = l2 && !l2_d;
  assign acq_end = busy_d && !acq_busy;

  logic freeze;
  assign freeze = (acq_end && (l2_pend || l2_edge)) ||
                  (!acq_busy && !acq_end && have_last && l2_edge);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      l2_d <= 1'b0; busy_d <= 1'b0; have_last <= 1'b0; l2_pend <= 1'b0;
      wbuf <= '0; rbuf <= '0; nstored <= '0;
      for (int c = 0; c < int'(NCH_P); c++)
        for (int b = 0; b < 8; b++) len[c][b] <= '0;
    end else begin
      l2_d   <= l2;
      busy_d <= acq_busy;
      for (int c = 0; c < int'(NCH_P); c++)
        if (ch_done[c]) len[c][wbuf] <= ch_nwords[c];
      if (trig_acc) begin
        have_last <= 1'b0;
        l2_pend   <= 1'b0;
      end else if (acq_busy && l2_edge) begin
        l2_pend <= 1'b1;
      end
      if (acq_end && !freeze) have_last <= 1'b1;
      if (freeze) begin
        have_last <= 1'b0;
        l2_pend   <= 1'b0;
        wbuf      <= (wbuf + 1'b1) & nb_mask;
      end
      if (release_buf && !empty) rbuf <= (rbuf + 1'b1) & nb_mask;
      nstored <= nstored + 4'(freeze) - 4'(release_buf && !empty);
    end

endmodule
