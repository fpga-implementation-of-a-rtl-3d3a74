// pipe_divider: fully pipelined fractional divider for the CFD interpolation.
//
// Computes q = floor(num * 2^QW / den) for 0 <= num < den, the fraction of a
// sample at which the constant-fraction signal crosses zero. It is a restoring
// divider unrolled into QW stages, one quotient bit per stage, so it accepts a new
// division on every clock and never stalls the data path. A TAG_W-bit sideband
// travels with each division. Timing: the result appears with out_valid exactly
// QW clocks after in_valid. The interpolation by division is this design's choice.
// Each stage shifts the partial quotient left, so the top bit of a stage's input
// quotient is always dropped (lint lists it as unused).
module pipe_divider #(
  parameter int DW    = 26,   // width of num and den (unsigned)
  parameter int QW    = 10,   // quotient bits
  parameter int TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [DW-1:0]    num,
  input  logic [DW-1:0]    den,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [QW-1:0]    quot,
  output logic [TAG_W-1:0] out_tag
);
  logic [DW:0]      rem [1:QW];
  logic [DW-1:0]    dv  [1:QW];
  logic [QW-1:0]    q   [1:QW];
  logic [TAG_W-1:0] tg  [1:QW];
  logic             v   [1:QW];

  for (genvar s = 0; s < QW; s++) begin : g_stage
    logic [DW:0]      r_i;
    logic [DW-1:0]    d_i;
    logic [QW-1:0]    q_i;
    logic [TAG_W-1:0] t_i;
    logic             v_i;
    logic [DW+1:0]    trial;
    if (s == 0) begin : g_first
      assign r_i = {1'b0, num};
      assign d_i = den;
      assign q_i = '0;
      assign t_i = in_tag;
      assign v_i = in_valid;
    end else begin : g_next
      assign r_i = rem[s];
      assign d_i = dv[s];
      assign q_i = q[s];
      assign t_i = tg[s];
      assign v_i = v[s];
    end
    assign trial = {r_i, 1'b0} - {2'b00, d_i};
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rem[s+1] <= '0;
        dv[s+1]  <= '0;
        q[s+1]   <= '0;
        tg[s+1]  <= '0;
        v[s+1]   <= 1'b0;
      end else begin
        if (!trial[DW+1]) begin
          rem[s+1] <= trial[DW:0];
          q[s+1]   <= {q_i[QW-2:0], 1'b1};
        end else begin
          rem[s+1] <= {r_i[DW-1:0], 1'b0};
          q[s+1]   <= {q_i[QW-2:0], 1'b0};
        end
        dv[s+1] <= d_i;
        tg[s+1] <= t_i;
        v[s+1]  <= v_i;
      end
    end
  end

  assign out_valid = v[QW];
  assign quot      = q[QW];
  assign out_tag   = tg[QW];
endmodule
