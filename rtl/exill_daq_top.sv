// exill_daq_top: trigger-less digital acquisition for gamma spectroscopy with
// fast timing, spectroscopy digitisers and digital-CFD card side by side.
//
// Spectroscopy part (clk_dpp, 100 MS/s): NUM_DPP_CH channels of 14-bit samples,
// grouped in boards of eight. Every channel runs its own pulse processing
// (dpp_channel) and emits energy/time events; no common trigger is needed. Each
// board ORs the auto-triggers of the channels enabled in its trig_mask and its
// front-panel trigger input into a registered board trigger. That trigger drives
// the board's front-panel trigger output and is propagated to the board's
// channels, which use it when their ext_trig_en setting is on.
//
// Fast-timing part (clk_ft, one 10-bit sample per clock): NUM_CFD_CH scintillator
// channels. Each channel's multi-event buffer (acq_buffer) records windows around
// threshold triggers; its records stream straight into a constant fraction
// discriminator (cfd_core) which replaces the record by its trigger time tag and
// the interpolated arrival time of the pulse. listmode_merger collects the results
// of all channels into a single list-mode stream lm_*. A channel starts reading a
// new record only when its merger FIFO has room, so a stalled list-mode output
// fills the sample buffers and then shows up as lost triggers, never as lost
// results.
//
// The time-stamp counters run from reset on the sample clocks. The link between
// digitiser and CFD card, the data concentrator and the storage are outside this
// module; the ADC samples enter as ports. Channel counts follow the described set-up
// (ten 8-channel spectroscopy boards, sixteen scintillators); the memory depth and
// the single shared CFD setting are this design's choices. The buffers' fill
// level (full_buffers) is left unconnected here: the read-out runs on the
// valid/ready stream and lost triggers are counted per channel.
module exill_daq_top import daq_pkg::*; #(
  parameter int NUM_DPP_CH   = 80,
  parameter int NUM_CFD_CH   = 16,
  parameter int ACQ_ADDR_W   = 20,
  parameter int TRAP_MAX_LEN = 2048,
  localparam int NUM_BOARDS  = (NUM_DPP_CH + 7) / 8
) (
  // spectroscopy digitisers
  input  logic                    clk_dpp,
  input  logic                    rst_dpp_n,
  input  logic [DPP_SAMPLE_W-1:0] dpp_adc [NUM_DPP_CH],
  input  dpp_cfg_t                dpp_cfg [NUM_DPP_CH],
  input  logic [7:0]              trig_mask [NUM_BOARDS],
  input  logic [NUM_BOARDS-1:0]   board_trig_in,
  output logic [NUM_DPP_CH-1:0]   dpp_ev_valid,
  output dpp_event_t              dpp_ev [NUM_DPP_CH],
  output logic [NUM_BOARDS-1:0]   board_trig_out,
  // fast-timing digitisers and digital-CFD card
  input  logic                    clk_ft,
  input  logic                    rst_ft_n,
  input  logic                    ft_enable,
  input  logic [CFD_SAMPLE_W-1:0] ft_adc [NUM_CFD_CH],
  input  logic [CFD_SAMPLE_W-1:0] ft_threshold [NUM_CFD_CH],
  input  logic [3:0]              ft_buf_code,
  input  logic [ACQ_ADDR_W-1:0]   ft_post_trig,
  input  logic [4:0]              cfd_delay,
  input  logic [7:0]              cfd_fraction,
  input  logic [CFD_SAMPLE_W:0]   cfd_arm_thr,
  output logic                    lm_valid,
  input  logic                    lm_ready,
  output cfd_event_t              lm_event,
  output logic [NUM_CFD_CH-1:0]   ft_trig,
  output logic [31:0]             ft_lost_count [NUM_CFD_CH],
  output logic [31:0]             lm_drop_count
);
  // ---------------- spectroscopy ----------------
  logic [TS_W-1:0]        ts_dpp;
  logic [NUM_DPP_CH-1:0]  dpp_trig;

  always_ff @(posedge clk_dpp or negedge rst_dpp_n) begin
    if (!rst_dpp_n) ts_dpp <= '0;
    else            ts_dpp <= ts_dpp + 1'b1;
  end

  for (genvar c = 0; c < NUM_DPP_CH; c++) begin : g_dpp
    dpp_channel #(.MAX_LEN(TRAP_MAX_LEN)) u_ch (
      .clk(clk_dpp), .rst_n(rst_dpp_n), .in_valid(1'b1),
      .sample(dpp_adc[c]), .ts(ts_dpp), .cfg(dpp_cfg[c]), .ext_trig(board_trig_out[c/8]),
      .trig(dpp_trig[c]), .ev_valid(dpp_ev_valid[c]), .ev(dpp_ev[c]));
  end

  for (genvar b = 0; b < NUM_BOARDS; b++) begin : g_board
    logic [7:0] chan_trig;
    for (genvar i = 0; i < 8; i++) begin : g_bit
      if (b*8 + i < NUM_DPP_CH) begin : g_on
        assign chan_trig[i] = dpp_trig[b*8 + i];
      end else begin : g_off
        assign chan_trig[i] = 1'b0;
      end
    end
    always_ff @(posedge clk_dpp or negedge rst_dpp_n) begin
      if (!rst_dpp_n) board_trig_out[b] <= 1'b0;
      else            board_trig_out[b] <= |(chan_trig & trig_mask[b]) | board_trig_in[b];
    end
  end

  // ---------------- fast timing ----------------
  logic [TS_W-1:0]         ts_ft;
  logic [NUM_CFD_CH-1:0]   space_ok, cfd_valid;
  cfd_event_t              cfd_ev [NUM_CFD_CH];

  always_ff @(posedge clk_ft or negedge rst_ft_n) begin
    if (!rst_ft_n) ts_ft <= '0;
    else           ts_ft <= ts_ft + 1'b1;
  end

  for (genvar c = 0; c < NUM_CFD_CH; c++) begin : g_ft
    logic                    b_valid, b_ready, b_sop, b_eop;
    logic [CFD_SAMPLE_W-1:0] b_sample;
    logic [TS_W-1:0]         b_ttag;
    logic [10:0]             b_full;

    acq_buffer #(.ADDR_W(ACQ_ADDR_W)) u_buf (
      .clk(clk_ft), .rst_n(rst_ft_n), .enable(ft_enable),
      .sample(ft_adc[c]), .ts(ts_ft), .threshold(ft_threshold[c]),
      .buf_code(ft_buf_code), .post_trig(ft_post_trig),
      .out_valid(b_valid), .out_ready(b_ready), .out_sample(b_sample),
      .out_sop(b_sop), .out_eop(b_eop), .out_ttag(b_ttag),
      .trig_accepted(ft_trig[c]), .lost_count(ft_lost_count[c]),
      .full_buffers(b_full));

    // a record may only start when its result is sure to find room
    assign b_ready = space_ok[c] || !b_sop;

    cfd_core u_cfd (
      .clk(clk_ft), .rst_n(rst_ft_n), .channel(CH_W'(c)),
      .delay(cfd_delay), .fraction(cfd_fraction), .arm_thr(cfd_arm_thr),
      .in_valid(b_valid && b_ready), .in_sample(b_sample),
      .in_sop(b_sop), .in_eop(b_eop), .in_ttag(b_ttag),
      .ev_valid(cfd_valid[c]), .ev(cfd_ev[c]));
  end

  listmode_merger #(.NCH(NUM_CFD_CH)) u_merge (
    .clk(clk_ft), .rst_n(rst_ft_n),
    .in_valid(cfd_valid), .in_ev(cfd_ev), .space_ok,
    .out_valid(lm_valid), .out_ready(lm_ready), .out_ev(lm_event),
    .drop_count(lm_drop_count));
endmodule
