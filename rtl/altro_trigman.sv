// altro_trigman: Trigger Manager - acquisition windowing.
//
// A Level-1 trigger starts an acquisition of nsamples samples. The first
// sample after the trigger is the ADC output of the cycle following it
// (the ADC latency is not compensated); pretrig (0..15) samples taken before
// the trigger and a trigger delay (0..1023) shift the window. Since the data
// processor delays every sample by LAT_DP cycles, the window can reach
// back before the trigger: it is generated at the output of the processor,
// where win marks exactly the samples of the acquisition and time_df counts
// them from 0. At the processor input, acq_bc1 is raised from the first
// sample after the trigger to the last sample of the window (it freezes the
// self-calibration and enables the power-saved look-up) and time_bc1 gives
// each sample's index within the window (it addresses the baseline pattern
// memory).
//
// Triggers are ignored while an acquisition is running (busy, which also
// covers FINISH cycles after the window for the data format to close the
// block) or when the multi-event memory is full. trig_acc pulses for an
// accepted trigger. l1 is sampled on clk; a trigger is its rising edge.
// The window, pre-trigger and delay ranges follow the chip; the edge
// detection, the counters and the busy rule are this design's choices.
module altro_trigman
  import altro_pkg::*;
#(
  parameter int unsigned LAT_DP = 21,     // processor latency BC1 input -> DF input
  parameter int unsigned FINISH = 10      // cycles reserved after the window
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              l1,
  input  logic              full,
  input  trg_cfg_t          cfg,
  output logic              trig_acc,
  output logic              busy,
  output logic              acq_bc1,
  output logic [TIME_W-1:0] time_bc1,
  output logic              win,
  output logic [TIME_W-1:0] time_df
);

  localparam int unsigned CW = 12;

  logic          l1_d;
  logic [CW-1:0] cnt;             // cycles since the accepted trigger
  logic [CW-1:0] win_start, win_end, bc1_end;

  // window at the DF input covers cycles [win_start, win_end) after trigger
  assign win_start = CW'(LAT_DP + 1) - CW'(cfg.pretrig) + CW'(cfg.delay);
  assign win_end   = win_start + CW'(cfg.nsamples);
  assign bc1_end   = win_end - CW'(LAT_DP);

  assign trig_acc = l1 && !l1_d && !busy && !full;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      l1_d <= 1'b0; busy <= 1'b0; cnt <= '0;
      acq_bc1 <= 1'b0; time_bc1 <= '0; win <= 1'b0; time_df <= '0;
    end else begin
      l1_d <= l1;
      if (trig_acc) begin
        busy     <= 1'b1;
        cnt      <= CW'(1);
        acq_bc1  <= 1'b1;
        time_bc1 <= TIME_W'(cfg.pretrig) - cfg.delay;
        win      <= (win_start == CW'(1)) && (cfg.nsamples != 0);
        time_df  <= '0;
      end else if (busy) begin
        cnt      <= cnt + 1'b1;
        time_bc1 <= time_bc1 + 1'b1;
        if (cnt + 1'b1 >= bc1_end) acq_bc1 <= 1'b0;
        if (cnt + 1'b1 == win_start && cfg.nsamples != 0) win <= 1'b1;
        if (win) time_df <= time_df + 1'b1;
        if (cnt + 1'b1 == win_end) win <= 1'b0;
        if (cnt + 1'b1 == win_end + CW'(FINISH)) busy <= 1'b0;
      end
    end

endmodule
