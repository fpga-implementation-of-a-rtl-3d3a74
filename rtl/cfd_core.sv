// cfd_core: digital constant fraction discriminator on one sample record.
//
// A constant fraction discriminator times a pulse at the instant its leading edge
// reaches a fixed fraction of its own height, which removes the amplitude-dependent
// walk of a fixed threshold. Digitally the record is turned into
//   y[n] = x[n-D] - f * x[n]
// (the input delayed by D samples plus the input attenuated by f and inverted),
// whose zero crossing on the leading edge does not depend on the amplitude. The
// record's baseline is the mean of its first 2^BL_LOG samples and is removed first;
// to keep full precision all values are kept scaled by 2^BL_LOG * 256
// (f = fraction/256). The crossing is looked for only once the baseline-corrected
// input has exceeded arm_thr. The first sample pair with y[n-1] <= 0 < y[n] gives
//   t = (n-1) + (-y[n-1]) / (y[n] - y[n-1])
// and the fraction is computed by a pipelined divider to FINE_W bits, so at 1 GS/s
// one step of the fine time is about 1 ps. The result is an event with the record's
// trigger time tag, the coarse index n-1 inside the record and the fine fraction;
// a record without a crossing gives an event with found = 0 at its end. The pulse
// time relative to the trigger time tag is ttag + coarse + fine/2^FINE_W - the
// trigger's position in the record (post-trigger setting of the buffer).
// Interface: one record sample per beat while in_valid is high, in_sop/in_eop mark
// its first and last sample, in_ttag is valid with in_sop; the block never stalls.
// Timing: ev_valid of a crossing rises on the FINE_W-th clock edge after the one
// that takes sample n, that of a record without crossing on the edge taking eop;
// records must be longer than FINE_W samples. Settings change between records.
// Delay, fraction and zero crossing follow the described CFD; the baseline
// estimate, the arming threshold and the linear interpolation are this design's.
// rst_n also disables the record-length assertion (sampled on the clock), which
// lint reports as a reset used both asynchronously and synchronously; intended.
module cfd_core import daq_pkg::*; #(
  parameter int SAMPLE_W  = CFD_SAMPLE_W,
  parameter int MAX_DELAY = 32,
  parameter int FINE_W_P  = FINE_W,
  parameter int BL_LOG    = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CH_W-1:0]      channel,
  input  logic [$clog2(MAX_DELAY)-1:0] delay,    // D, 1 .. MAX_DELAY-1
  input  logic [7:0]           fraction,          // f * 256
  input  logic [SAMPLE_W:0]    arm_thr,
  input  logic                 in_valid,
  input  logic [SAMPLE_W-1:0]  in_sample,
  input  logic                 in_sop,
  input  logic                 in_eop,
  input  logic [TS_W-1:0]      in_ttag,
  output logic                 ev_valid,
  output cfd_event_t           ev
);
  localparam int BL    = 1 << BL_LOG;
  localparam int XW    = SAMPLE_W + BL_LOG + 2;   // scaled, baseline-free sample
  localparam int YW    = XW + 10;                 // constant fraction signal
  localparam int TAG_W = TS_W + COARSE_W;

  logic [SAMPLE_W-1:0]        hist [MAX_DELAY];
  logic [COARSE_W-1:0]        idx, cur_idx;
  logic [SAMPLE_W+BL_LOG-1:0] bl_sum;
  logic [TS_W-1:0]            rec_ttag, cur_ttag;
  logic                       armed, found, yprev_ok;
  logic signed [YW-1:0]       yprev;
  logic signed [XW-1:0]       xs_now, xs_del;
  logic signed [YW-1:0]       y;
  logic                       y_ok, arm_now, armed_now, zcross;
  logic [YW-2:0]              num, den;
  logic                       dv_out;
  logic [FINE_W_P-1:0]        q_out;
  logic [TAG_W-1:0]           tag_out;

  assign cur_idx  = in_sop ? '0 : idx;
  assign cur_ttag = in_sop ? in_ttag : rec_ttag;
  assign xs_now   = $signed({2'b00, in_sample, {BL_LOG{1'b0}}}) - $signed({2'b00, bl_sum});
  assign xs_del   = $signed({2'b00, hist[delay-1'b1], {BL_LOG{1'b0}}}) - $signed({2'b00, bl_sum});
  assign y        = ($signed(YW'(xs_del)) <<< 8) - $signed(YW'(xs_now)) * $signed({1'b0, fraction});
  assign y_ok     = !in_sop && (cur_idx >= COARSE_W'(BL)) && (cur_idx >= COARSE_W'(delay));
  assign arm_now  = y_ok && (xs_now > $signed({1'b0, arm_thr, {BL_LOG{1'b0}}}));
  assign armed_now = (armed && !in_sop) || arm_now;
  assign zcross    = in_valid && armed_now && !(found && !in_sop) && yprev_ok && y_ok &&
                    (yprev <= 0) && (y > 0);
  assign num      = (YW-1)'(-yprev);
  assign den      = (YW-1)'(y - yprev);

  pipe_divider #(.DW(YW-1), .QW(FINE_W_P), .TAG_W(TAG_W)) u_div (
    .clk, .rst_n,
    .in_valid(zcross), .num, .den, .in_tag({cur_ttag, cur_idx - 1'b1}),
    .out_valid(dv_out), .quot(q_out), .out_tag(tag_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_DELAY; i++) hist[i] <= '0;
      idx      <= '0;
      bl_sum   <= '0;
      rec_ttag <= '0;
      armed    <= 1'b0;
      found    <= 1'b0;
      yprev_ok <= 1'b0;
      yprev    <= '0;
      ev_valid <= 1'b0;
      ev       <= '0;
    end else begin
      ev_valid <= 1'b0;
      if (in_valid) begin
        hist[0] <= in_sample;
        for (int i = 1; i < MAX_DELAY; i++) hist[i] <= hist[i-1];
        idx <= cur_idx + 1'b1;
        if (in_sop) begin
          bl_sum   <= (SAMPLE_W+BL_LOG)'(in_sample);
          rec_ttag <= in_ttag;
        end else if (cur_idx < COARSE_W'(BL)) begin
          bl_sum <= bl_sum + (SAMPLE_W+BL_LOG)'(in_sample);
        end
        armed    <= armed_now && !in_eop;
        found    <= (found && !in_sop) || zcross;
        yprev_ok <= y_ok;
        yprev    <= y;
        if (in_eop && !(found && !in_sop) && !zcross) begin
          ev_valid   <= 1'b1;
          ev.channel <= channel;
          ev.ttag    <= cur_ttag;
          ev.coarse  <= '0;
          ev.fine    <= '0;
          ev.found   <= 1'b0;
        end
      end
      if (dv_out) begin
        ev_valid   <= 1'b1;
        ev.channel <= channel;
        ev.ttag    <= tag_out[TAG_W-1 -: TS_W];
        ev.coarse  <= tag_out[COARSE_W-1:0];
        ev.fine    <= q_out;
        ev.found   <= 1'b1;
      end
    end
  end

  // a division result and a no-crossing event never meet (records > FINE_W samples)
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(dv_out && in_valid && in_eop && !(found && !in_sop) && !zcross))
    else $error("cfd_core: record shorter than the divider latency");
endmodule
