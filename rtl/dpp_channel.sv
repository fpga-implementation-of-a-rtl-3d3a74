// dpp_channel: on-line pulse processing of one spectroscopy channel.
//
// It reduces the raw 14-bit sample stream of a preamplifier to one event per
// pulse: a time stamp and an energy. Four parts work side by side on the samples:
//   step_trigger      starts the conversion when the signal rises by more than a
//                     threshold within GAP samples,
//   zc_timing         finds the zero crossing of the second derivative, whose
//                     position does not depend on the pulse amplitude,
//   trapezoid_filter  shapes the pulse into a trapezoid (pole-zero cancelled),
//   energy_sampler    takes flat top minus baseline.
// When the energy is ready the event is emitted with the time of the zero crossing
// (or the trigger time with no_zc set if no crossing was found by then). With
// cfg.ext_trig_en set, the board trigger ext_trig (propagated from other channels
// or from the front panel) also starts a conversion, except in the 8 clocks after
// the channel's own trigger, which covers the channel's own trigger coming back
// through the board. Interface: one sample per clock while in_valid is high, ts is
// the time stamp of the sample in the same cycle; ev_valid pulses for one cycle;
// trig is the channel's own auto-trigger, which the board can propagate. The
// latency from the trigger to the event is peak_delay plus a few cycles. The
// split into trigger, timing and trapezoid follows the described processing;
// the way results are combined and the 8-clock block of the returning trigger
// are this design's choices.
module dpp_channel import daq_pkg::*; #(
  parameter int SAMPLE_W = DPP_SAMPLE_W,
  parameter int GAP      = 4,
  parameter int MAX_LEN  = 2048
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [SAMPLE_W-1:0] sample,
  input  logic [TS_W-1:0]     ts,
  input  dpp_cfg_t            cfg,
  input  logic                ext_trig,
  output logic                trig,
  output logic                ev_valid,
  output dpp_event_t          ev
);
  logic                     zc_valid, zc_none;
  logic [TS_W-1:0]          zc_ts;
  logic                     trap_valid;
  logic signed [TRAP_W-1:0] trap;
  logic                     e_valid, pileup;
  logic [ENERGY_W-1:0]      energy;
  logic [TS_W-1:0]          t_hold;
  logic                     none_hold;
  logic                     start;     // own or accepted external trigger
  logic [3:0]               own_block;

  assign start = trig || (cfg.ext_trig_en && ext_trig && own_block == 0);

  step_trigger #(.SAMPLE_W(SAMPLE_W), .GAP(GAP)) u_trig (
    .clk, .rst_n, .in_valid, .sample,
    .threshold(cfg.step_thr), .holdoff(cfg.holdoff), .trig);

  zc_timing #(.SAMPLE_W(SAMPLE_W), .GAP(GAP)) u_zc (
    .clk, .rst_n, .in_valid, .sample, .ts, .trig(start), .window(cfg.zc_window),
    .zc_valid, .zc_ts, .zc_none);

  trapezoid_filter #(.SAMPLE_W(SAMPLE_W), .MAX_LEN(MAX_LEN)) u_trap (
    .clk, .rst_n, .in_valid, .sample,
    .k(cfg.rise_k), .l(cfg.gap_l), .m(cfg.pz_m), .trap_valid, .trap);

  energy_sampler u_energy (
    .clk, .rst_n, .trap_valid, .trap, .trig(start),
    .peak_delay(cfg.peak_delay), .e_shift(cfg.e_shift),
    .e_valid, .energy, .pileup);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_hold    <= '0;
      none_hold <= 1'b1;
      own_block <= '0;
      ev_valid  <= 1'b0;
      ev        <= '0;
    end else begin
      ev_valid <= 1'b0;
      if (trig)               own_block <= 4'd8;
      else if (own_block != 0) own_block <= own_block - 1'b1;
      if (start) begin                // pending: trigger time, no crossing yet
        t_hold    <= ts - 1'b1;
        none_hold <= 1'b1;
      end
      if (zc_valid) begin
        t_hold    <= zc_ts;
        none_hold <= zc_none;
      end
      if (e_valid) begin
        ev_valid  <= 1'b1;
        ev.ts     <= zc_valid ? zc_ts : t_hold;
        ev.no_zc  <= zc_valid ? zc_none : none_hold;
        ev.energy <= energy;
        ev.pileup <= pileup;
      end
    end
  end
endmodule
