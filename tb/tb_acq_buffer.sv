// tb_acq_buffer: self-checking test of the multi-event sample buffer.
//
// A channel memory of 1024 samples is used with 4 buffers of 256 and then with a
// single buffer of 1024. The input is a known sawtooth below the threshold with
// short pulses above it at known times; every sample is remembered here by its
// time stamp. Each record read out must carry the trigger time as its tag and
// hold exactly the samples from (tag - pre) to (tag + post_trig), with sop/eop on
// the first and last beat. Phases: random read-out stalls with spaced pulses (no
// trigger may be lost); read-out held off while pulses keep coming, so the buffers
// fill and lost_count must count the triggers that find no free buffer; then the
// one-buffer geometry.
module tb_acq_buffer;
  import daq_pkg::*;
  localparam int AW = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                    enable;
  logic [CFD_SAMPLE_W-1:0] sample, threshold;
  logic [TS_W-1:0]         ts;
  logic [3:0]              buf_code;
  logic [AW-1:0]           post_trig;
  logic                    out_valid, out_ready, out_sop, out_eop, trig_accepted;
  logic [CFD_SAMPLE_W-1:0] out_sample;
  logic [TS_W-1:0]         out_ttag;
  logic [31:0]             lost_count;
  logic [10:0]             full_buffers;

  acq_buffer #(.ADDR_W(AW)) dut (.clk, .rst_n, .enable, .sample, .ts, .threshold,
    .buf_code, .post_trig, .out_valid, .out_ready, .out_sample, .out_sop, .out_eop,
    .out_ttag, .trig_accepted, .lost_count, .full_buffers);

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  hist [longint];
  bit  is_pulse [longint];
  int  n_acc = 0, n_rec = 0, beat = 0, bsize, pre;
  longint cur_tag;

  always @(posedge clk) if (rst_n) begin
    if (trig_accepted) n_acc++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_sop) begin
        cur_tag = longint'(out_ttag);
        beat = 0;
        if (!is_pulse.exists(cur_tag)) begin
          failures++; $display("record tag %0d is no pulse start", cur_tag);
        end
      end
      if (out_ttag != TS_W'(cur_tag) || out_sop != (beat == 0) || out_eop != (beat == bsize - 1) ||
          int'(out_sample) != hist[cur_tag - pre + beat]) begin
        failures++;
        if (failures < 10)
          $display("tag %0d beat %0d: sample %0d sop %0b eop %0b, expected %0d", cur_tag, beat,
                   out_sample, out_sop, out_eop, hist[cur_tag - pre + beat]);
      end
      if (out_eop) n_rec++;
      beat++;
    end
  end

  longint t = 0;
  int sent = 0;
  task automatic run(int cycles, int spacing, int rdy_pct);
    for (int i = 0; i < cycles; i++) begin
      int x;
      @(negedge clk);
      x = int'((t * 7) % 500);
      if (t >= 300 && t % spacing >= 50 && t % spacing < 56) x = 800;
      if (t >= 300 && t % spacing == 50) begin is_pulse[t] = 1; sent++; end
      hist[t] = x;
      sample = CFD_SAMPLE_W'(x);
      ts = TS_W'(t);
      out_ready = ($urandom % 100) < rdy_pct;
      t++;
    end
  endtask

  initial begin
    enable = 1'b1; threshold = 10'd600; buf_code = 4'd2; post_trig = 10'd100;
    sample = '0; ts = '0; out_ready = 1'b0;
    bsize = 256; pre = 256 - 1 - 100;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // phase A: spaced pulses, random stalls, nothing lost
    run(8000, 400, 75);
    run(1500, 100000, 100);
    checks++;
    if (n_rec != sent || n_acc != sent || lost_count != 0) begin
      failures++; $display("A: sent %0d accepted %0d records %0d lost %0d", sent, n_acc, n_rec, lost_count);
    end
    // phase B: no read-out while pulses arrive: buffers fill, triggers lost
    sent = 0; n_acc = 0; n_rec = 0;
    run(4000, 300, 0);
    checks++;
    if (full_buffers != 11'd4 || lost_count == 0) begin
      failures++; $display("B: full %0d lost %0d", full_buffers, lost_count);
    end
    run(4000, 300, 100);
    run(1500, 100000, 100);
    checks++;
    if (n_rec != n_acc || int'(lost_count) + n_acc > sent || int'(lost_count) + n_acc < sent - 1) begin
      failures++; $display("B: sent %0d accepted %0d records %0d lost %0d", sent, n_acc, n_rec, lost_count);
    end
    // phase C: one buffer of 1024, long post-trigger part
    rst_n = 1'b0;
    buf_code = 4'd0; post_trig = 10'd1000; bsize = 1024; pre = 1024 - 1 - 1000;
    @(negedge clk);
    rst_n = 1'b1;
    sent = 0; n_acc = 0; n_rec = 0;
    run(12000, 3000, 90);
    run(2500, 100000, 100);
    checks++;
    if (n_rec != sent || n_acc != sent || n_rec == 0) begin
      failures++; $display("C: sent %0d accepted %0d records %0d", sent, n_acc, n_rec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
