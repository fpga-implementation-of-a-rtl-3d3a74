// energy_sampler: pulse height from the trapezoid of a spectroscopy channel.
//
// The energy of a pulse is the height of the trapezoid's flat top above the
// trapezoid's own baseline. The baseline is the mean of BL_LEN trapezoid samples
// taken BL_GAP samples before the current one, so that the start of the pulse does
// not leak into it; it is frozen when a trigger arrives. The flat top is sampled
// `peak_delay` trapezoid samples after the trigger, the difference is shifted right
// by e_shift and clipped to 0 .. 2^ENERGY_W-1. A second trigger before the flat top
// has been sampled marks the event as pile-up (the first pulse's energy is still
// reported). Interface: trap/trap_valid from the trapezoid filter, trig from the
// trigger (one cycle). Timing: the trapezoid sample present peak_delay+1 clocks
// after trig is used, and e_valid pulses for one cycle on that clock edge with
// energy and pileup.
// The baseline-to-flat-top measurement follows the described processing; the
// averaging window, the single flat-top sample and the pile-up rule are this
// design's choices.
module energy_sampler import daq_pkg::*; #(
  parameter int ENERGY_W_P = ENERGY_W,
  parameter int BL_LOG     = 4,    // baseline average over 2^BL_LOG samples
  parameter int BL_GAP     = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     trap_valid,
  input  logic signed [TRAP_W-1:0] trap,
  input  logic                     trig,
  input  logic [11:0]              peak_delay,
  input  logic [3:0]               e_shift,
  output logic                     e_valid,
  output logic [ENERGY_W_P-1:0]    energy,
  output logic                     pileup
);
  localparam int BL_LEN = 1 << BL_LOG;
  localparam int HL     = BL_LEN + BL_GAP;
  localparam int SW     = TRAP_W + BL_LOG;

  logic signed [TRAP_W-1:0] hist [HL];
  logic signed [SW-1:0]     bl_sum;
  logic signed [TRAP_W-1:0] bl_hold;
  logic                     busy;
  logic                     pu;
  logic [11:0]              cnt;
  logic signed [TRAP_W-1:0] diff;
  logic signed [TRAP_W-1:0] shifted;

  assign diff    = trap - bl_hold;
  assign shifted = diff >>> e_shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HL; i++) hist[i] <= '0;
      bl_sum  <= '0;
      bl_hold <= '0;
      busy    <= 1'b0;
      pu      <= 1'b0;
      cnt     <= '0;
      e_valid <= 1'b0;
      energy  <= '0;
      pileup  <= 1'b0;
    end else begin
      e_valid <= 1'b0;
      if (trap_valid) begin
        hist[0] <= trap;
        for (int i = 1; i < HL; i++) hist[i] <= hist[i-1];
        bl_sum <= bl_sum + SW'(hist[BL_GAP-1]) - SW'(hist[HL-1]);
      end
      if (trig) begin
        if (busy) pu <= 1'b1;
        else begin
          busy    <= 1'b1;
          pu      <= 1'b0;
          cnt     <= peak_delay;
          bl_hold <= TRAP_W'(bl_sum >>> BL_LOG);
        end
      end
      if (busy && trap_valid) begin
        if (cnt == 0) begin
          busy    <= 1'b0;
          e_valid <= 1'b1;
          pileup  <= pu || trig;
          if (shifted < 0)
            energy <= '0;
          else if (shifted > $signed({{(TRAP_W-ENERGY_W_P){1'b0}}, {ENERGY_W_P{1'b1}}}))
            energy <= '1;
          else
            energy <= shifted[ENERGY_W_P-1:0];
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end
endmodule
