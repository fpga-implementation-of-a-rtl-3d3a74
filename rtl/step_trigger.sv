// step_trigger: auto-trigger of a spectroscopy channel on a voltage step.
//
// The trigger compares the rise of the signal over GAP samples, x[n]-x[n-GAP],
// with a programmable threshold instead of comparing the absolute level, so the
// preamplifier baseline does not matter. When the step exceeds the threshold the
// block gives a one-cycle trig pulse (registered, one clock after the sample) and
// disarms. It re-arms once the hold-off has run out and the step has fallen back to
// the threshold or below. No trigger is given until GAP samples have been seen.
// Triggering on a step follows the acquisition described for the setup; the step
// length, the hold-off and the re-arm rule are this design's choices.
module step_trigger import daq_pkg::*; #(
  parameter int SAMPLE_W = DPP_SAMPLE_W,
  parameter int GAP      = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [SAMPLE_W-1:0] sample,
  input  logic [SAMPLE_W:0]   threshold,
  input  logic [11:0]         holdoff,
  output logic                trig
);
  logic [SAMPLE_W-1:0]       hist [GAP];
  logic [$clog2(GAP+1)-1:0]  primed;
  logic                      armed;
  logic [11:0]               hold;
  logic signed [SAMPLE_W+1:0] step;
  logic                      over;

  assign step = $signed({2'b00, sample}) - $signed({2'b00, hist[GAP-1]});
  assign over = step > $signed({1'b0, threshold});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < GAP; i++) hist[i] <= '0;
      primed <= '0;
      armed  <= 1'b0;
      hold   <= '0;
      trig   <= 1'b0;
    end else begin
      trig <= 1'b0;
      if (in_valid) begin
        hist[0] <= sample;
        for (int i = 1; i < GAP; i++) hist[i] <= hist[i-1];
        if (primed != ($clog2(GAP+1))'(GAP)) begin
          primed <= primed + 1'b1;
        end else if (armed) begin
          if (over) begin
            trig  <= 1'b1;
            armed <= 1'b0;
            hold  <= holdoff;
          end
        end else if (hold != 0) begin
          hold <= hold - 1'b1;
        end else if (!over) begin
          armed <= 1'b1;
        end
      end
    end
  end
endmodule
