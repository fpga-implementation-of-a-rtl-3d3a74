// listmode_merger: gathers the timing results of all fast-timing channels into a
// single list-mode stream.
//
// Each channel's results enter a small FIFO of its own; a round-robin selector
// takes one entry per clock from the next non-empty FIFO after the one served
// last and presents it, with the channel number filled in, under a valid/ready
// handshake. space_ok tells a channel that its FIFO can still take two results, so
// the sample buffer feeding it may start or continue a record; when the output is
// held back the buffers fill and, in the end, lose triggers instead of results
// being dropped here. A result arriving at a full FIFO is dropped and counted in
// drop_count. Timing: a result can leave on the clock after it entered. The single
// stream of time tag plus arrival time follows the described data flow; FIFOs and
// round-robin order are this design's choices.
module listmode_merger import daq_pkg::*; #(
  parameter int NCH        = 16,
  parameter int FIFO_DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NCH-1:0]   in_valid,
  input  cfd_event_t       in_ev [NCH],
  output logic [NCH-1:0]   space_ok,
  output logic             out_valid,
  input  logic             out_ready,
  output cfd_event_t       out_ev,
  output logic [31:0]      drop_count
);
  localparam int EW = $bits(cfd_event_t);
  localparam int CW = (NCH > 1) ? $clog2(NCH) : 1;
  localparam int FC = $clog2(FIFO_DEPTH) + 1;

  logic [NCH-1:0]   f_empty, f_full, f_pop;
  logic [EW-1:0]    f_dout  [NCH];
  logic [FC-1:0]    f_count [NCH];
  logic [CW-1:0]    last, pick;
  logic             any;
  cfd_event_t       sel;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    sync_fifo #(.WIDTH(EW), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push(in_valid[c]), .din(in_ev[c]),
      .pop(f_pop[c]), .dout(f_dout[c]), .empty(f_empty[c]), .full(f_full[c]),
      .count(f_count[c]));
    assign space_ok[c] = f_count[c] <= FC'(FIFO_DEPTH - 2);
  end

  // round robin: first non-empty channel after `last`
  always_comb begin
    any  = 1'b0;
    pick = last;
    for (int i = 1; i <= NCH; i++) begin
      if (!any && !f_empty[(int'(last) + i) % NCH]) begin
        any  = 1'b1;
        pick = CW'((int'(last) + i) % NCH);
      end
    end
    sel         = cfd_event_t'(f_dout[pick]);
    sel.channel = CH_W'(pick);
    f_pop       = '0;
    if (any && out_ready) f_pop[pick] = 1'b1;
  end

  assign out_valid = any;
  assign out_ev    = sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last       <= CW'(NCH - 1);
      drop_count <= '0;
    end else begin
      if (any && out_ready) last <= pick;
      drop_count <= drop_count + 32'($countones(in_valid & f_full & ~f_pop));
    end
  end
endmodule
