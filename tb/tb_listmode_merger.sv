// tb_listmode_merger: self-checking test of the list-mode merger.
//
// Four channels deliver results at random; the output is taken with a random
// ready. A queue per channel, kept here, checks that every result leaves exactly
// once, in order within its channel and with the channel number filled in, and
// that when every FIFO holds data the channels are served in turn. A phase with
// ready held low floods the FIFOs: space_ok must drop before a FIFO is full and
// the results pushed into full FIFOs must be counted as dropped.
module tb_listmode_merger;
  import daq_pkg::*;
  localparam int NCH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NCH-1:0] in_valid, space_ok;
  cfd_event_t     in_ev [NCH];
  logic           out_valid, out_ready;
  cfd_event_t     out_ev;
  logic [31:0]    drop_count;

  listmode_merger #(.NCH(NCH)) dut (.clk, .rst_n, .in_valid, .in_ev, .space_ok,
    .out_valid, .out_ready, .out_ev, .drop_count);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cfd_event_t ref_q [NCH][$];
  int occ [NCH];      // entries in each DUT FIFO, modelled
  int exp_drops = 0, last_ch = NCH - 1, n_out = 0, n_rr = 0;
  bit flood = 0;

  always @(posedge clk) if (rst_n) begin
    bit all_busy;
    int occ0 [NCH];
    all_busy = 1;
    for (int c = 0; c < NCH; c++) begin
      occ0[c] = occ[c];
      if (occ[c] == 0) all_busy = 0;
      checks++;
      if (space_ok[c] != (occ[c] <= 2)) begin
        failures++; $display("space_ok[%0d]=%0b with %0d held", c, space_ok[c], occ[c]);
      end
    end
    if (out_valid && out_ready) begin
      int c;
      c = int'(out_ev.channel);
      checks++;
      if (c >= NCH || ref_q[c].size() == 0 || out_ev.ttag != ref_q[c][0].ttag ||
          out_ev.fine != ref_q[c][0].fine) begin
        failures++;
        $display("unexpected output ch=%0d ttag=%0d", c, out_ev.ttag);
      end else void'(ref_q[c].pop_front());
      if (all_busy) begin
        n_rr++;
        checks++;
        if (c != (last_ch + 1) % NCH) begin
          failures++; $display("round robin broken: %0d after %0d", c, last_ch);
        end
      end
      last_ch = c;
      occ[c]--;
      n_out++;
    end
    for (int c = 0; c < NCH; c++) begin
      if (in_valid[c]) begin
        if (occ0[c] == 4 && !(out_valid && out_ready && int'(out_ev.channel) == c)) exp_drops++;
        else begin
          cfd_event_t e;
          e = in_ev[c];
          e.channel = CH_W'(c);
          ref_q[c].push_back(e);
          occ[c]++;
        end
      end
    end
  end

  longint serial = 0;
  initial begin
    in_valid = '0; out_ready = 1'b0;
    for (int c = 0; c < NCH; c++) begin in_ev[c] = '0; occ[c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      flood = (t >= 1000 && t < 1100);
      out_ready = flood ? 1'b0 : (t >= 2000 ? 1'b1 : ($urandom % 4 != 0));
      for (int c = 0; c < NCH; c++) begin
        in_valid[c] = (t < 2500) && (($urandom % 5) == 0);
        in_ev[c] = '0;
        in_ev[c].channel = 8'hEE;
        in_ev[c].ttag = TS_W'(serial);
        in_ev[c].fine = FINE_W'($urandom);
        in_ev[c].found = 1'b1;
        serial++;
      end
    end
    @(negedge clk);
    checks++;
    if (int'(drop_count) != exp_drops || exp_drops == 0 || n_rr == 0) begin
      failures++; $display("drops %0d expected %0d, round-robin checks %0d", drop_count, exp_drops, n_rr);
    end
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (ref_q[c].size() != 0) begin failures++; $display("channel %0d not drained", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
