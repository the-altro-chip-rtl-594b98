// altro_busif: readout-clock bus interface.
//
// The chip is a slave on a 40-bit bus (BD) with a few control lines. A
// master starts a transaction by raising cstb with write and BD stable:
// BD[39:20] is the address - bit 39 broadcast, bits 38:31 chip address,
// bits 30:27 channel, bits 26:20 command or register code - and BD[19:0]
// the write data. The transaction is run by the SEU-protected
// idle/wait/done machine (altro_hamming_fsm): cstb (for this chip) moves it
// to wait, where the operation runs; ready moves it to done, which answers
// with ackn (and, for a read, the register on bd_out with bd_oe) until the
// master drops cstb.
//
// Operations: register write or read (altro_regs); RPINC frees the oldest
// stored event; SWTRG and L2 issue a software Level-1 or Level-2 trigger;
// CHRDO reads out the addressed channel's block of the oldest stored event:
// the words are driven on bd_out with dstb high, one per cycle, trsf high
// during the whole transfer. The transfer pauses while an acquisition runs
// (acq_busy), so that the bus is quiet during sampling, and resumes after
// it. Commands to the sampling clock domain are toggles (cmd_*_tgl) to be
// synchronised there; acq_busy is synchronised here with two flip-flops.
// Memory reads take one cycle (re, then rdata).
// The 40-bit bus, the protected machine with its cstb/ready inputs, the
// readout interruption during acquisitions and the command set follow the
// chip; the address layout, codes and the cycle timing are this design's.
module altro_busif
  import altro_pkg::*;
#(
  parameter int unsigned NCH_P = NCH,
  parameter int unsigned AW    = $clog2(MEM_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CHIP_W-1:0]    chip_addr,
  // bus
  input  logic                 cstb,
  input  logic                 write,
  input  logic [MEM_W-1:0]     bd_in,
  output logic [MEM_W-1:0]     bd_out,
  output logic                 bd_oe,
  output logic                 ackn,
  output logic                 trsf,
  output logic                 dstb,
  // registers
  output logic                 reg_wr,
  output logic [6:0]           reg_code,
  output logic [3:0]           reg_ch,
  output logic                 reg_bcast,
  output logic [19:0]          reg_wdata,
  input  logic [19:0]          reg_rdata,
  output logic                 err_clr,
  // data memory readout
  output logic                 mem_re,
  output logic [3:0]           mem_ch,
  output logic [AW-1:0]        mem_raddr,
  input  logic [MEM_W-1:0]     mem_rdata,
  input  logic [AW-1:0]        rd_base,
  input  logic [AW:0]          rd_len [NCH_P],
  input  logic                 empty,
  input  logic                 acq_busy,
  // commands to the sampling clock domain
  output logic                 cmd_release_tgl,
  output logic                 cmd_swtrg_tgl,
  output logic                 cmd_l2_tgl,
  // SEU protection
  input  logic [5:0]           seu_flip,
  output logic                 err_single,
  output logic                 err_double
);

  logic        sel;
  logic        st_wait, st_done;
  logic        ready;

  assign reg_code  = bd_in[26:20];
  assign reg_ch    = bd_in[30:27];
  assign reg_bcast = bd_in[39];
  assign reg_wdata = bd_in[19:0];
  assign sel       = cstb && (bd_in[39] || bd_in[38:31] == chip_addr);

  altro_hamming_fsm u_fsm (
    .clk, .rst_n, .cstb(sel), .ready, .seu_flip,
    .st_idle(), .st_wait, .st_done, .err_single, .err_double, .code()
  );

  // acquisition flag from the sampling clock
  logic [1:0] acq_sync;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) acq_sync <= '0;
    else        acq_sync <= {acq_sync[0], acq_busy};

  logic is_rdo;
  assign is_rdo = (reg_code == C_CHRDO) && !reg_bcast;

  // one-shot operation at the first wait cycle
  logic first;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) first <= 1'b1;
    else        first <= !st_wait;

  logic op;
  assign op = st_wait && first;
  assign reg_wr  = op && write && (reg_code < C_CHRDO);
  assign err_clr = op && (reg_code == C_ERCLR);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cmd_release_tgl <= 1'b0;
      cmd_swtrg_tgl   <= 1'b0;
      cmd_l2_tgl      <= 1'b0;
    end else if (op) begin
      if (reg_code == C_RPINC) cmd_release_tgl <= !cmd_release_tgl;
      if (reg_code == C_SWTRG) cmd_swtrg_tgl   <= !cmd_swtrg_tgl;
      if (reg_code == C_L2)    cmd_l2_tgl      <= !cmd_l2_tgl;
    end

  // ---- channel readout engine
  logic [AW:0] issued, len;
  logic        rdo_act, rd_pend;
  logic [MEM_W-1:0] dout_r;
  assign len    = empty ? '0 : rd_len[reg_ch];
  assign mem_ch = reg_ch;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      issued <= '0; rdo_act <= 1'b0; rd_pend <= 1'b0;
      mem_re <= 1'b0; mem_raddr <= '0; dstb <= 1'b0; dout_r <= '0;
    end else begin
      mem_re  <= 1'b0;
      dstb    <= 1'b0;
      rd_pend <= mem_re;
      if (op && is_rdo) begin
        issued  <= '0;
        rdo_act <= 1'b1;
      end else if (rdo_act) begin
        if (issued < len && !acq_sync[1]) begin
          mem_re    <= 1'b1;
          mem_raddr <= rd_base + AW'(issued);
          issued    <= issued + 1'b1;
        end else if (issued >= len && !mem_re && !rd_pend) begin
          rdo_act <= 1'b0;
        end
      end
      if (rd_pend) begin
        dstb   <= 1'b1;
        dout_r <= mem_rdata;
      end
    end

  assign ready = st_wait && !first && !rdo_act;
  assign trsf  = rdo_act || dstb;
  assign ackn  = st_done;
  assign bd_out = dstb ? dout_r : {20'h0, reg_rdata};
  assign bd_oe = dstb || (st_done && !write && !is_rdo);

endmodule
