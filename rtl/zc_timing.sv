// zc_timing: arrival time of a spectroscopy pulse from the zero crossing of the
// second derivative of the preamplifier signal.
//
// The preamplifier signal is modelled as the sum of two exponentials, a fast one
// set by the detector and a slow one set by the preamplifier's RC. Its second
// derivative is negative just after the start (the rising edge bends over) and
// turns positive at a time that depends on the two time constants only, not on
// the amplitude, so that sign change marks the pulse with a walk-free time. The
// block forms d2[n] = x[n] - 2 x[n-G] + x[n-2G] (G = GAP samples) on every sample.
// After a trigger it reports the first sample at which d2 goes from negative to
// zero or positive. The reported time is that sample's time stamp minus G, the
// centre of the three-point difference; resolution is one sample. If no crossing
// follows within `window` samples, zc_none is set and the time stamp of the
// trigger sample is returned. Interface: one sample per clock while in_valid is
// high (the sample stream is continuous), ts is the time stamp of the current
// sample, trig is the registered trigger of the previous sample; zc_valid pulses
// for one cycle. Using the zero crossing of the second derivative follows the
// described algorithm; G, the search window and the time-out are this design's.
module zc_timing import daq_pkg::*; #(
  parameter int SAMPLE_W = DPP_SAMPLE_W,
  parameter int GAP      = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [SAMPLE_W-1:0] sample,
  input  logic [TS_W-1:0]     ts,
  input  logic                trig,
  input  logic [11:0]         window,
  output logic                zc_valid,
  output logic [TS_W-1:0]     zc_ts,
  output logic                zc_none
);
  localparam int DW = SAMPLE_W + 3;
  logic [SAMPLE_W-1:0]  hist [2*GAP];
  logic signed [DW-1:0] d2;
  logic                 d2_neg;     // previous d2 was < 0
  logic                 zcross;
  logic                 searching;
  logic [11:0]          cnt;
  logic [TS_W-1:0]      trig_ts;

  assign d2 = $signed({3'b000, sample}) - ($signed({3'b000, hist[GAP-1]}) <<< 1)
            + $signed({3'b000, hist[2*GAP-1]});
  assign zcross = d2_neg && (d2 >= 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 2*GAP; i++) hist[i] <= '0;
      d2_neg    <= 1'b0;
      searching <= 1'b0;
      cnt       <= '0;
      trig_ts   <= '0;
      zc_valid  <= 1'b0;
      zc_ts     <= '0;
      zc_none   <= 1'b0;
    end else begin
      zc_valid <= 1'b0;
      if (in_valid) begin
        hist[0] <= sample;
        for (int i = 1; i < 2*GAP; i++) hist[i] <= hist[i-1];
        d2_neg <= (d2 < 0);
        if (trig) begin
          // a new trigger restarts the search
          searching <= !zcross;
          cnt       <= window;
          trig_ts   <= ts - 1'b1;
        end
        if ((searching || trig) && zcross) begin
          zc_valid  <= 1'b1;
          zc_ts     <= ts - TS_W'(GAP);
          zc_none   <= 1'b0;
          searching <= 1'b0;
        end else if (searching && !trig) begin
          if (cnt == 0) begin
            zc_valid  <= 1'b1;
            zc_ts     <= trig_ts;
            zc_none   <= 1'b1;
            searching <= 1'b0;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
      end
    end
  end
endmodule
