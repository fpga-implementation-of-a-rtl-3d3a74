// trapezoid_filter: recursive trapezoidal shaper with pole-zero cancellation.
//
// A charge-sensitive preamplifier answers a pulse with a fast step followed by an
// exponential decay of time constant tau. This filter turns that shape into a
// symmetric trapezoid whose flat-top height is proportional to the step, the
// digital counterpart of a shaping amplifier. It uses the well-known recursive
// form of the shaper:
//   d[n] = v[n] - v[n-k] - v[n-l] + v[n-k-l]
//   p[n] = p[n-1] + d[n]
//   r[n] = p[n] + M d[n]
//   s[n] = s[n-1] + r[n]
// k is the rise time, l-k the flat top (l >= k) and M = 1/(exp(1/tau)-1) cancels
// the pole of the decay (tau in samples). For an input A*(M/(M+1))^n the flat top is
// A*(M+1)*k. The preamplifier's own baseline is removed, but a constant input B
// (present since reset) leaves the constant output offset B*k*l: this is the
// filter's own DC level, which the energy sampler measures as the baseline.
// Samples before the first one after reset count as zero, which keeps the
// accumulators exact. The delay line is a circular memory of
// MAX_LEN samples; k+l must stay below MAX_LEN. Change k, l or M only in reset.
// Timing: one sample per clock when in_valid is high; s[n] appears on trap after
// the second clock edge following the one that took the sample, with trap_valid. The trapezoid itself follows the described
// processing; its recursive insides, the widths and MAX_LEN are this design's.
module trapezoid_filter import daq_pkg::*; #(
  parameter int SAMPLE_W = DPP_SAMPLE_W,
  parameter int MAX_LEN  = 2048
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [SAMPLE_W-1:0]      sample,
  input  logic [10:0]              k,
  input  logic [10:0]              l,
  input  logic [15:0]              m,
  output logic                     trap_valid,
  output logic signed [TRAP_W-1:0] trap
);
  localparam int AW = $clog2(MAX_LEN);
  localparam int DW = SAMPLE_W + 3;

  logic [SAMPLE_W-1:0] dline [MAX_LEN];
  logic [AW-1:0]       wp;
  logic [AW:0]         fill;    // samples written, saturating at MAX_LEN
  logic [SAMPLE_W-1:0] v_k, v_l, v_kl;
  logic [AW-1:0]       a_k, a_l, a_kl;
  logic signed [DW-1:0] d;
  logic signed [DW-1:0] d1;
  logic signed [TRAP_W-1:0] p1;
  logic                 v1;
  logic signed [TRAP_W-1:0] r;

  assign a_k  = wp - AW'(k);
  assign a_l  = wp - AW'(l);
  assign a_kl = wp - AW'(k) - AW'(l);
  assign v_k  = (fill >= (AW+1)'(k))     ? dline[a_k]  : '0;
  assign v_l  = (fill >= (AW+1)'(l))     ? dline[a_l]  : '0;
  assign v_kl = (fill >= (AW+1)'(k) + (AW+1)'(l)) ? dline[a_kl] : '0;
  assign d = $signed({3'b000, sample}) - $signed({3'b000, v_k})
           - $signed({3'b000, v_l}) + $signed({3'b000, v_kl});
  assign r = p1 + TRAP_W'(d1) * $signed({1'b0, m});

  always_ff @(posedge clk) begin
    if (in_valid) dline[wp] <= sample;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp         <= '0;
      fill       <= '0;
      d1         <= '0;
      p1         <= '0;
      v1         <= 1'b0;
      trap       <= '0;
      trap_valid <= 1'b0;
    end else begin
      v1         <= in_valid;
      trap_valid <= v1;
      if (in_valid) begin
        wp <= wp + 1'b1;
        if (fill != (AW+1)'(MAX_LEN)) fill <= fill + 1'b1;
        d1 <= d;
        p1 <= p1 + TRAP_W'(d);
      end
      if (v1) trap <= trap + r;
    end
  end
endmodule
