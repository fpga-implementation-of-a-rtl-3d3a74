// tb_dpp_channel: self-checking test of one spectroscopy channel.
//
// Preamplifier pulses A*(b^t - exp(-t/3)) with b = 40/41 (decay matched to the
// pole-zero setting M = 40) ride on a baseline of 1000. Worked out by hand, the
// trapezoid's flat top for such a pulse is A*k*(M+1 - 1/(1-exp(-1/3))), so the
// expected energy is that, shifted right by e_shift; the test allows 1 %. The time
// stamp must equal the second-derivative zero crossing that the test finds in the
// same samples, and pulses of different amplitude at the same phase must get the
// same time relative to their start to within one sample. Two pulses 30 samples
// apart must give one event flagged as pile-up (its energy and time are not
// checked: the second pulse disturbs both). The board trigger input is driven with
// the channel's own trigger delayed by two clocks, as the board loop returns it;
// this must not start a second conversion. A board trigger on the quiet baseline
// must give one event with energy 0 (within 2), no crossing and the trigger time,
// and must be ignored once ext_trig_en is cleared.
module tb_dpp_channel;
  import daq_pkg::*;
  localparam int G = 4, K = 40, L = 60, M = 40, SH = 4, BASE = 1000;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                    in_valid = 1'b1;
  logic [DPP_SAMPLE_W-1:0] sample;
  logic [TS_W-1:0]         ts;
  dpp_cfg_t                cfg;
  logic                    trig, ev_valid, ext_trig, ext_pulse = 1'b0;
  logic [1:0]              trig_d;
  dpp_event_t              ev;

  dpp_channel #(.MAX_LEN(256)) dut (.clk, .rst_n, .in_valid, .sample, .ts, .cfg,
                                    .ext_trig, .trig, .ev_valid, .ev);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int T_EXT = 4200, T_EXT_OFF = 4400;
  always_ff @(posedge clk) trig_d <= rst_n ? {trig_d[0], trig} : 2'b00;
  assign ext_trig = trig_d[1] || ext_pulse;

  int xs [int];
  int t0s [5] = '{500, 1500, 2500, 3500, 3530};
  real amps [5] = '{600.0, 200.0, 600.0, 400.0, 400.0};
  int n_ev = 0;
  longint rel [3];

  function automatic int d2(int t);
    return xs[t] - 2 * xs[t-G] + xs[t-2*G];
  endfunction

  function automatic int find_zc(int t0);
    for (int t = t0 + 1; t < t0 + 200; t++)
      if (d2(t - 1) < 0 && d2(t) >= 0) return t - G;
    return -1;
  endfunction

  always @(posedge clk) if (rst_n && ev_valid) begin
    int  i;
    real e_exp;
    i = n_ev;
    n_ev++;
    checks++;
    if (i == 4) begin
      if (ev.energy > 2 || !ev.no_zc || ev.pileup ||
          longint'(ev.ts) < T_EXT - 1 || longint'(ev.ts) > T_EXT + 2) begin
        failures++;
        $display("external-trigger event: ts %0d energy %0d no_zc %0b pileup %0b",
                 ev.ts, ev.energy, ev.no_zc, ev.pileup);
      end
    end else if (i > 4) begin
      failures++; $display("extra event");
    end else begin
      e_exp = amps[i] * K * (real'(M + 1) - 1.0 / (1.0 - $exp(-1.0 / 3.0))) / real'(1 << SH);
      if (ev.pileup != (i == 3) ||
          (i < 3 && (real'(ev.energy) < 0.99 * e_exp || real'(ev.energy) > 1.01 * e_exp ||
                     ev.no_zc || longint'(ev.ts) != longint'(find_zc(t0s[i]))))) begin
        failures++;
        $display("event %0d: ts %0d energy %0d pileup %0b no_zc %0b, expected ts %0d energy %0f",
                 i, ev.ts, ev.energy, ev.pileup, ev.no_zc, find_zc(t0s[i]), e_exp);
      end
      if (i < 3) rel[i] = longint'(ev.ts) - t0s[i];
    end
  end

  initial begin
    cfg = '0;
    cfg.step_thr = 15'd60; cfg.holdoff = 12'd10; cfg.zc_window = 12'd150;
    cfg.rise_k = 11'(K); cfg.gap_l = 11'(L); cfg.pz_m = 16'(M);
    cfg.peak_delay = 12'd50; cfg.e_shift = 4'(SH); cfg.ext_trig_en = 1'b1;
    for (int t = -20; t < 4600; t++) begin
      real x;
      x = BASE;
      for (int i = 0; i < 5; i++)
        if (t >= t0s[i])
          x += amps[i] * ((40.0 / 41.0) ** real'(t - t0s[i]) - $exp(-real'(t - t0s[i]) / 3.0));
      xs[t] = int'(x);
    end
    sample = DPP_SAMPLE_W'(BASE); ts = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4600; t++) begin
      @(negedge clk);
      sample = DPP_SAMPLE_W'(xs[t]);
      ts = TS_W'(t);
      ext_pulse = (t == T_EXT || t == T_EXT_OFF);
      if (t == T_EXT + 100) cfg.ext_trig_en = 1'b0;
    end
    checks++;
    if (n_ev != 5) begin failures++; $display("%0d events instead of 5", n_ev); end
    checks++;
    if (rel[0] - rel[1] > 1 || rel[1] - rel[0] > 1 || rel[0] != rel[2]) begin
      failures++; $display("time walk: %0d %0d %0d", rel[0], rel[1], rel[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
