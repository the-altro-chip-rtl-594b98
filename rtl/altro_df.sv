// altro_df: Data Format - cluster labelling and 10-to-40-bit packing.
//
// During the acquisition window every sample flagged keep by the zero
// suppression is passed on as a 10-bit word. A run of consecutive kept
// samples is a cluster; when it ends (a sample not kept, or the window
// closes) two words are appended after its samples: the time stamp of its
// last sample and its size, counted in 10-bit words including the samples,
// the time stamp and the size word itself. Because the size comes last,
// the block is read back-linked: from the end, the size tells how far back
// the cluster begins. The 10-bit words are packed four to a 40-bit memory
// word, the first word in bits [9:0]. When the window has closed the last
// memory word is completed with stuffing words (10'h2AA) and a 40-bit
// trailer is written: {14'h2AAA, number of 10-bit words (without
// stuffing), 4'hA, hardware address = chip address and channel}.
//
// Interface: din/keep/win/time_idx arrive together each clk cycle. we/waddr
// /wdata write the channel's buffer (waddr is the offset inside it, from 0).
// done pulses for one cycle after the trailer write, with nwords40 the block
// length in memory words. If the block would not fit in max_words memory
// words, samples are dropped (whole clusters are still closed) and ovf is
// set. Latency from a sample to its memory write is 1 to 3 cycles; the
// trailer is written 2 to 6 cycles after the window closes (done one cycle later).
// Labelling, the time-stamp and size rules, packing, stuffing and the
// trailer contents follow the chip; the word order, the stuffing and marker
// values, the trailer bit layout and the overflow rule are this design's.
module altro_df
  import altro_pkg::*;
#(
  parameter int unsigned AW = 10            // buffer offset bits
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ADC_W-1:0]    din,
  input  logic                keep,
  input  logic                win,
  input  logic [TIME_W-1:0]   time_idx,
  input  logic [HWADDR_W-1:0] hwaddr,
  input  logic [AW:0]         max_words,    // buffer size in 40-bit words
  output logic                we,
  output logic [AW-1:0]       waddr,
  output logic [MEM_W-1:0]    wdata,
  output logic                done,
  output logic [AW:0]         nwords40,
  output logic                ovf
);

  typedef enum logic [1:0] {S_ACQ, S_STUFF, S_TRAIL} state_e;
  state_e state;

  logic                in_clu, win_d;
  logic [ADC_W-1:0]    clen;        // samples in the open cluster
  logic [TIME_W-1:0]   last_t;
  logic [ADC_W+1:0]    nw10;        // 10-bit words of the block so far
  logic [ADC_W-1:0]    pk [8];      // packing buffer
  logic [2:0]          pc;          // words in pk

  logic [AW-1:0]       wptr;        // next memory offset

  // a new block starts with the first cycle of the window
  logic             newblk;
  logic [ADC_W+1:0] nw10_base;
  logic [AW-1:0]    wptr_base;
  assign newblk    = (state == S_ACQ) && win && !win_d;
  assign nw10_base = newblk ? '0 : nw10;
  assign wptr_base = newblk ? '0 : wptr;

  logic [ADC_W+1:0] allowed;
  assign allowed = (ADC_W+2)'((max_words - 1'b1) << 2);

  // words pushed this cycle
  logic [1:0]       npush;
  logic [ADC_W-1:0] w0, w1;
  logic             take, close_clu;
  always_comb begin
    take      = (state == S_ACQ) && win && keep && (nw10_base + 3 <= allowed);
    close_clu = in_clu && !(win && keep && (state == S_ACQ));
    npush = '0; w0 = '0; w1 = '0;
    if (close_clu) begin
      npush = 2'd2;
      w0    = ADC_W'(last_t);
      w1    = clen + ADC_W'(2);
    end else if (take) begin
      npush = 2'd1;
      w0    = din;
    end else if (state == S_STUFF && pc != 0) begin
      npush = 2'd1;
      w0    = STUFF_WORD;
    end
  end
  // note: a sample can not be taken in the cycle a cluster is closed,
  // because closing happens only when the current sample is not kept.

  logic [ADC_W-1:0] tmp [8];
  logic [3:0]       tot;
  always_comb begin
    tmp = pk;
    tot = {1'b0, pc} + {2'b00, npush};
    if (npush >= 2'd1) tmp[pc]        = w0;
    if (npush == 2'd2) tmp[3'(pc + 1)] = w1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_ACQ; in_clu <= 1'b0; win_d <= 1'b0;
      clen <= '0; last_t <= '0; nw10 <= '0; pc <= '0; wptr <= '0;
      for (int i = 0; i < 8; i++) pk[i] <= '0;
      we <= 1'b0; waddr <= '0; wdata <= '0;
      done <= 1'b0; nwords40 <= '0; ovf <= 1'b0;
    end else begin
      we    <= 1'b0;
      done  <= 1'b0;
      win_d <= win;
      // cluster bookkeeping
      if (take) begin
        in_clu <= 1'b1;
        clen   <= in_clu ? clen + 1'b1 : ADC_W'(1);
        last_t <= time_idx;
      end else if (close_clu) begin
        in_clu <= 1'b0;
      end
      if (newblk)                                    ovf <= 1'b0;
      else if (state == S_ACQ && win && keep && !take) ovf <= 1'b1;
      nw10 <= nw10_base + ((take || close_clu) ? (ADC_W+2)'(npush) : '0);
      // packing
      if (tot >= 4'd4) begin
        we    <= 1'b1;
        wdata <= {tmp[3], tmp[2], tmp[1], tmp[0]};
        waddr <= wptr_base;
        wptr  <= wptr_base + 1'b1;
        for (int i = 0; i < 4; i++) pk[i] <= tmp[i+4];
        pc <= 3'(tot - 4'd4);
      end else begin
        wptr <= wptr_base;
        pk   <= tmp;
        pc   <= 3'(tot);
      end
      // end of block
      case (state)
        S_ACQ:   if (win_d && !win) state <= S_STUFF;
        S_STUFF: if (!in_clu && pc == 0 && tot == 0) state <= S_TRAIL;
        S_TRAIL: begin
          we       <= 1'b1;
          waddr    <= wptr;
          wdata    <= make_trailer(ADC_W'(nw10), hwaddr);
          nwords40 <= (AW+1)'(wptr) + 1'b1;
          done     <= 1'b1;
          state    <= S_ACQ;
        end
        default: state <= S_ACQ;
      endcase
    end

endmodule
