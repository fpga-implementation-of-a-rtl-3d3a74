// tb_zc_timing: self-checking test of the second-derivative zero-crossing timer.
//
// Preamplifier pulses (fast rise, slow decay) of different amplitudes start at
// known sample times. The test computes the second derivative of the very same
// integer samples itself, finds where it changes sign after the trigger and checks
// the reported time stamp. It also checks the property the method rests on: pulses
// of very different amplitude starting at the same phase give the same time, to
// within one sample. A
// parabolic ramp, whose second derivative stays positive, must time out with
// zc_none set after `window` samples.
module tb_zc_timing;
  import daq_pkg::*;
  localparam int G = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                    in_valid = 1'b1;
  logic [DPP_SAMPLE_W-1:0] sample;
  logic [TS_W-1:0]         ts;
  logic                    trig;
  logic [11:0]             window;
  logic                    zc_valid, zc_none;
  logic [TS_W-1:0]         zc_ts;

  zc_timing #(.GAP(G)) dut (.clk, .rst_n, .in_valid, .sample, .ts, .trig, .window,
                            .zc_valid, .zc_ts, .zc_none);

  int xs[int];              // samples by time stamp
  longint exp_ts;
  bit     exp_none;
  bit     pending = 0;
  longint trig_t;
  longint rel[2];
  int     nrel = 0;

  function automatic int preamp(int t, int t0, int a);
    if (t < t0) return 0;
    return int'(real'(a) * ($exp(-real'(t - t0) / 40.0) - $exp(-real'(t - t0) / 3.0)));
  endfunction

  function automatic int d2(int t);
    return xs[t] - 2 * xs[t-G] + xs[t-2*G];
  endfunction

  // expected crossing: first t >= trigger sample+1 with d2(t-1) < 0 and d2(t) >= 0
  function automatic longint find_zc(longint tt, int win, output bit none);
    none = 0;
    for (longint t = tt + 1; t <= tt + 1 + win; t++)
      if (d2(int'(t - 1)) < 0 && d2(int'(t)) >= 0) return t - G;
    none = 1;
    return tt;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    if (zc_valid) begin
      checks++;
      if (!pending || zc_ts != TS_W'(exp_ts) || zc_none != exp_none) begin
        failures++;
        $display("zc_ts=%0d none=%0b expected %0d none=%0b", zc_ts, zc_none, exp_ts, exp_none);
      end
      if (!zc_none && nrel < 2) begin rel[nrel] = longint'(zc_ts) - trig_t; nrel++; end
      pending = 0;
    end
  end

  initial begin
    int t0s[3] = '{200, 1200, 2200};
    int amps[3] = '{1200, 9000, 0};
    int trig_at[3];
    window = 12'd100;
    trig = 1'b0; sample = '0; ts = '0;
    // precompute the whole waveform
    for (int t = -20; t < 3000; t++) begin
      int x;
      x = 1500;
      for (int i = 0; i < 2; i++) x += preamp(t, t0s[i], amps[i]);
      if (t >= 2200 && t < 2300) x += (t - 2200) * (t - 2200) / 4;
      xs[t] = x;
    end
    trig_at[0] = 203; trig_at[1] = 1203; trig_at[2] = 2230;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      trig = 1'b0;
      for (int i = 0; i < 3; i++)
        if (t == trig_at[i] + 1) begin
          bit nn;
          trig = 1'b1;
          trig_t = t0s[i];
          exp_ts = find_zc(trig_at[i], int'(window), nn);
          exp_none = nn;
          if (nn) exp_ts = trig_at[i];
          pending = 1;
        end
      sample = DPP_SAMPLE_W'(xs[t]);
      ts = TS_W'(t);
    end
    checks++;
    if (nrel != 2 || rel[0] - rel[1] > 1 || rel[1] - rel[0] > 1) begin
      failures++;
      $display("amplitude dependence: %0d vs %0d", rel[0], rel[1]);
    end
    checks++;
    if (pending) begin failures++; $display("a result is missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
