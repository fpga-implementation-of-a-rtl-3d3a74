// acq_buffer: multi-event sample memory of one fast-timing digitiser channel.
//
// The channel memory of 2^ADDR_W samples is split into 2^buf_code equal buffers
// (1 to 1024). The active buffer is written on every clock as a circular record of
// the signal. Once the part before the trigger point is filled, a rising crossing
// of `threshold` is accepted as a trigger: its time stamp becomes the record's time
// tag, post_trig more samples are written and the buffer is frozen. The next free
// buffer becomes active at once, so consecutive windows follow each other without
// dead time. A frozen record holds the last 2^(ADDR_W-buf_code) samples, the
// trigger sample sitting post_trig samples before its end. If every buffer is full,
// writing pauses and each trigger seen meanwhile adds one to lost_count. The read
// side streams full buffers out, oldest first, one record at a time: out_sample
// with out_sop on the first and out_eop on the last sample and out_ttag on every
// beat, under a valid/ready handshake, one beat per clock when ready stays high.
// A buffer is released as soon as its last sample has been read from memory.
// Settings (buf_code, post_trig) may change only while the buffers are empty;
// post_trig must be below the buffer size. Interface timing: the sample input is
// taken on every clock; triggers are reported by trig_accepted one cycle later.
// Multi-event buffering with 1 to 1024 buffers follows the digitiser described for
// the fast-timing setup; the memory depth, the trigger rule and the read-out
// stream are this design's choices. An assertion checks that writing never
// overruns a full buffer; lint notes that rst_n is then used both as the
// asynchronous reset and, sampled, to disable the assertion, which is intended.
module acq_buffer import daq_pkg::*; #(
  parameter int SAMPLE_W    = CFD_SAMPLE_W,
  parameter int ADDR_W      = 20,
  parameter int MAX_BUF_LOG = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic [SAMPLE_W-1:0] sample,
  input  logic [TS_W-1:0]     ts,
  input  logic [SAMPLE_W-1:0] threshold,
  input  logic [3:0]          buf_code,
  input  logic [ADDR_W-1:0]   post_trig,
  output logic                out_valid,
  input  logic                out_ready,
  output logic [SAMPLE_W-1:0] out_sample,
  output logic                out_sop,
  output logic                out_eop,
  output logic [TS_W-1:0]     out_ttag,
  output logic                trig_accepted,
  output logic [31:0]         lost_count,
  output logic [MAX_BUF_LOG:0] full_buffers
);
  localparam int NB = 1 << MAX_BUF_LOG;
  localparam int FW = SAMPLE_W + 2 + TS_W;

  typedef enum logic [1:0] {W_FILL, W_ARMED, W_POST, W_WAIT} wstate_t;

  logic [SAMPLE_W-1:0]   mem [1 << ADDR_W];
  logic [ADDR_W-1:0]     meta_start [NB];
  logic [TS_W-1:0]       meta_ttag  [NB];

  // buffer geometry
  logic [3:0]            code;
  logic [4:0]            bsize_log;
  logic [ADDR_W:0]       bsize;
  logic [ADDR_W-1:0]     omask;
  logic [MAX_BUF_LOG-1:0] bmask;
  logic [MAX_BUF_LOG:0]  nbuf;
  logic [ADDR_W:0]       pre_needed;

  assign code       = (buf_code > 4'(MAX_BUF_LOG)) ? 4'(MAX_BUF_LOG) : buf_code;
  assign bsize_log  = 5'(ADDR_W) - 5'(code);
  assign bsize      = (ADDR_W+1)'(1) << bsize_log;
  assign omask      = ADDR_W'(bsize - 1'b1);
  assign nbuf       = (MAX_BUF_LOG+1)'(1) << code;
  assign bmask      = MAX_BUF_LOG'(nbuf - 1'b1);
  assign pre_needed = (bsize > (ADDR_W+1)'(post_trig) + 1'b1) ?
                      bsize - (ADDR_W+1)'(post_trig) - 1'b1 : '0;

  // ---------------- writer ----------------
  wstate_t               wstate;
  logic [MAX_BUF_LOG-1:0] wbuf;
  logic [ADDR_W-1:0]     woff;
  logic [ADDR_W:0]       wcnt;
  logic [ADDR_W-1:0]     pcnt;
  logic [SAMPLE_W-1:0]   prev;
  logic [TS_W-1:0]       ttag;
  logic                  crossing;
  logic                  writing;
  logic                  freeze;
  logic [ADDR_W-1:0]     waddr;
  logic [TS_W-1:0]       freeze_tag;

  assign crossing = (prev < threshold) && (sample >= threshold);
  assign writing  = (wstate != W_WAIT);
  assign waddr    = (ADDR_W'(wbuf) << bsize_log) | (woff & omask);
  assign freeze   = (wstate == W_POST && pcnt == 0) ||
                    (wstate == W_ARMED && enable && crossing && post_trig == 0);
  assign freeze_tag = (wstate == W_ARMED) ? ts : ttag;

  // ---------------- reader ----------------
  logic                  rbusy;
  logic [MAX_BUF_LOG-1:0] rbuf;
  logic [ADDR_W-1:0]     rstart;
  logic [ADDR_W:0]       ridx;
  logic [TS_W-1:0]       rttag;
  logic                  issue, last_issue;
  logic [ADDR_W-1:0]     raddr;
  logic                  rd_v, rd_sop, rd_eop;
  logic [SAMPLE_W-1:0]   rd_q;
  logic [TS_W-1:0]       rd_ttag;
  logic [2:0]            fcount;
  logic                  fempty, ffull;
  logic [FW-1:0]         fdout;

  assign raddr      = (ADDR_W'(rbuf) << bsize_log) | ((rstart + ADDR_W'(ridx)) & omask);
  assign issue      = rbusy && ((3'(fcount) + 3'(rd_v)) < 3'd3);
  assign last_issue = issue && (ridx == bsize - 1'b1);

  always_ff @(posedge clk) begin
    if (writing) mem[waddr] <= sample;
    if (freeze) begin
      meta_start[wbuf] <= (woff + 1'b1) & omask;
      meta_ttag[wbuf]  <= freeze_tag;
    end
    rd_q <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate        <= W_FILL;
      wbuf          <= '0;
      woff          <= '0;
      wcnt          <= '0;
      pcnt          <= '0;
      prev          <= '0;
      ttag          <= '0;
      trig_accepted <= 1'b0;
      lost_count    <= '0;
      full_buffers  <= '0;
      rbusy         <= 1'b0;
      rbuf          <= '0;
      rstart        <= '0;
      ridx          <= '0;
      rttag         <= '0;
      rd_v          <= 1'b0;
      rd_sop        <= 1'b0;
      rd_eop        <= 1'b0;
      rd_ttag       <= '0;
    end else begin
      prev          <= sample;
      trig_accepted <= 1'b0;

      // writer
      if (writing) woff <= (woff + 1'b1) & omask;
      unique case (wstate)
        W_FILL: begin
          if (!enable) wcnt <= '0;
          else begin
            wcnt <= wcnt + 1'b1;
            if (wcnt + 1'b1 >= pre_needed) wstate <= W_ARMED;
          end
        end
        W_ARMED: begin
          if (!enable) begin
            wstate <= W_FILL;
            wcnt   <= '0;
          end else if (crossing) begin
            trig_accepted <= 1'b1;
            ttag          <= ts;
            pcnt          <= post_trig - 1'b1;
            if (post_trig != 0) wstate <= W_POST;
          end
        end
        W_POST: pcnt <= pcnt - 1'b1;
        W_WAIT: begin
          if (enable && crossing) lost_count <= lost_count + 1'b1;
          if (full_buffers < nbuf) begin
            wbuf   <= (wbuf + 1'b1) & bmask;
            wstate <= W_FILL;
            wcnt   <= '0;
          end
        end
        default: wstate <= W_FILL;
      endcase
      if (freeze) begin
        if (full_buffers + (MAX_BUF_LOG+1)'(1) - (MAX_BUF_LOG+1)'(last_issue) < nbuf) begin
          wbuf   <= (wbuf + 1'b1) & bmask;
          wstate <= W_FILL;
          wcnt   <= '0;
        end else begin
          wstate <= W_WAIT;
        end
      end
      full_buffers <= full_buffers + (MAX_BUF_LOG+1)'(freeze) - (MAX_BUF_LOG+1)'(last_issue);

      // reader
      if (!rbusy) begin
        if (full_buffers != 0) begin
          rbusy  <= 1'b1;
          ridx   <= '0;
          rstart <= meta_start[rbuf];
          rttag  <= meta_ttag[rbuf];
        end
      end else if (issue) begin
        ridx <= ridx + 1'b1;
        if (last_issue) begin
          rbusy <= 1'b0;
          rbuf  <= (rbuf + 1'b1) & bmask;
        end
      end
      rd_v    <= issue;
      rd_sop  <= issue && (ridx == 0);
      rd_eop  <= last_issue;
      rd_ttag <= rttag;
    end
  end

  sync_fifo #(.WIDTH(FW), .DEPTH(4)) u_out (
    .clk, .rst_n,
    .push(rd_v), .din({rd_q, rd_sop, rd_eop, rd_ttag}),
    .pop(out_ready), .dout(fdout), .empty(fempty), .full(ffull), .count(fcount));

  assign out_valid = !fempty;
  assign {out_sample, out_sop, out_eop, out_ttag} = fdout;

  // the read side never pushes into a full output queue
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(rd_v && ffull && !out_ready)) else $error("acq_buffer: output queue overflow");
endmodule
