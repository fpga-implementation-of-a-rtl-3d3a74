// tb_exill_daq_top: end-to-end test of the whole acquisition at reduced size.
//
// Sizes: 16 spectroscopy channels (two boards), 4 fast-timing channels, 4096
// samples of buffer memory per channel (16 buffers of 256 samples).
// Spectroscopy: preamplifier pulses on channels 0, 9 and 15 must give events with
// the energy worked out by hand (see tb_dpp_channel) and a close pair on channel 15
// a pile-up event; board 0 propagates channel 0's trigger to its trigger output
// and to channel 1 (external trigger enabled, no pulse), which must give a
// forced event with energy 0 and no crossing; channel 0 has the external trigger
// enabled too and must not be retriggered by its own trigger. Board 1 (mask 0)
// must put out only the one pulse given on its front-panel input, which forces an
// event on channel 10.
// Fast timing: the same scintillator pulse is sent to channels 0 and 1, channel 1
// shifted by 0.37 sample, at varying phases and amplitudes; the list-mode entries
// must give a time difference of 0.37 +- 0.05 sample, with an rms spread under
// 28 ps (one sample taken as 1 ns), and the same start-relative time for every
// pulse on channel 0 to within 0.05 sample. A small pulse that
// triggers the buffer but stays under the CFD arming level must give an entry
// without a crossing. With the list-mode output held off, the records back up into
// the merger and the buffers until triggers are lost; after release every record
// must still come out. Each of these mechanisms is counted and must occur.
module tb_exill_daq_top;
  import daq_pkg::*;
  localparam int NDPP = 16, NCFD = 4, AW = 12, NB = 2;
  localparam int K = 40, L = 60, M = 40, SH = 4, BASE = 1000;
  localparam int POST = 200, BSIZE = 256, PRE = BSIZE - 1 - POST, FTB = 50;
  logic clk_dpp = 1'b0, clk_ft = 1'b0, rst_dpp_n = 1'b0, rst_ft_n = 1'b0;
  always #5 clk_dpp = ~clk_dpp;
  always #3 clk_ft = ~clk_ft;
  int checks = 0, failures = 0;

  logic [DPP_SAMPLE_W-1:0] dpp_adc [NDPP];
  dpp_cfg_t                dpp_cfg [NDPP];
  logic [7:0]              trig_mask [NB];
  logic [NDPP-1:0]         dpp_ev_valid;
  dpp_event_t              dpp_ev [NDPP];
  logic [NB-1:0]           board_trig_in, board_trig_out;
  logic                    ft_enable;
  logic [CFD_SAMPLE_W-1:0] ft_adc [NCFD];
  logic [CFD_SAMPLE_W-1:0] ft_threshold [NCFD];
  logic [3:0]              ft_buf_code;
  logic [AW-1:0]           ft_post_trig;
  logic [4:0]              cfd_delay;
  logic [7:0]              cfd_fraction;
  logic [CFD_SAMPLE_W:0]   cfd_arm_thr;
  logic                    lm_valid, lm_ready;
  cfd_event_t              lm_event;
  logic [NCFD-1:0]         ft_trig;
  logic [31:0]             ft_lost_count [NCFD];
  logic [31:0]             lm_drop_count;

  exill_daq_top #(.NUM_DPP_CH(NDPP), .NUM_CFD_CH(NCFD), .ACQ_ADDR_W(AW), .TRAP_MAX_LEN(256)) dut (
    .clk_dpp, .rst_dpp_n, .dpp_adc, .dpp_cfg, .trig_mask, .board_trig_in, .dpp_ev_valid, .dpp_ev,
    .board_trig_out, .clk_ft, .rst_ft_n, .ft_enable, .ft_adc, .ft_threshold,
    .ft_buf_code, .ft_post_trig, .cfd_delay, .cfd_fraction, .cfd_arm_thr,
    .lm_valid, .lm_ready, .lm_event, .ft_trig, .ft_lost_count, .lm_drop_count);

  initial begin : watchdog
    repeat (200000) @(posedge clk_ft);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- spectroscopy stimulus and checks ----------------
  typedef struct { int ch; int t0; real a; } dpulse_t;
  dpulse_t dp [5] = '{'{0, 300, 600.0}, '{9, 500, 300.0}, '{15, 800, 500.0},
                      '{15, 2000, 400.0}, '{15, 2030, 400.0}};
  int n_dpp_ev = 0, n_pileup = 0, n_board0 = 0, n_board1 = 0, n_ch0_trig = 0, n_forced = 0;
  localparam int T_FP = 1500;  // front-panel trigger into board 1

  function automatic real preamp(int t, int t0, real a);
    if (t < t0) return 0.0;
    return a * ((40.0 / 41.0) ** real'(t - t0) - $exp(-real'(t - t0) / 3.0));
  endfunction

  always @(posedge clk_dpp) if (rst_dpp_n) begin
    if (board_trig_out[0]) n_board0++;
    if (board_trig_out[1]) n_board1++;
    if (dut.dpp_trig[0]) n_ch0_trig++;
    for (int c = 0; c < NDPP; c++) if (dpp_ev_valid[c]) begin
      int  k;
      real e_exp;
      n_dpp_ev++;
      if (dpp_ev[c].pileup) n_pileup++;
      if (c == 1 || c == 10) begin
        n_forced++;
        checks++;
        if (dpp_ev[c].energy > 2 || !dpp_ev[c].no_zc || dpp_ev[c].pileup ||
            longint'(dpp_ev[c].ts) < (c == 1 ? 300 : T_FP - 1) ||
            longint'(dpp_ev[c].ts) > (c == 1 ? 310 : T_FP + 3)) begin
          failures++;
          $display("forced event ch %0d: ts %0d energy %0d no_zc %0b", c, dpp_ev[c].ts,
                   dpp_ev[c].energy, dpp_ev[c].no_zc);
        end
        continue;
      end
      k = -1;
      for (int i = 0; i < 5; i++)
        if (dp[i].ch == c && k < 0 && i != 4) begin
          if (!(c == 15 && i == 2 && dpp_ev[c].pileup)) k = i;
        end
      if (c == 15 && dpp_ev[c].pileup) k = 3;
      else if (c == 15) k = 2;
      checks++;
      e_exp = dp[k].a * K * (real'(M + 1) - 1.0 / (1.0 - $exp(-1.0 / 3.0))) / real'(1 << SH);
      if (!dpp_ev[c].pileup && (real'(dpp_ev[c].energy) < 0.99 * e_exp ||
                                real'(dpp_ev[c].energy) > 1.01 * e_exp || dpp_ev[c].no_zc)) begin
        failures++;
        $display("dpp ch %0d: energy %0d expected %0f", c, dpp_ev[c].energy, e_exp);
      end
      if (!dpp_ev[c].pileup && (longint'(dpp_ev[c].ts) < dp[k].t0 || longint'(dpp_ev[c].ts) > dp[k].t0 + 40)) begin
        failures++;
        $display("dpp ch %0d: time %0d for a pulse at %0d", c, dpp_ev[c].ts, dp[k].t0);
      end
    end
  end

  initial begin
    for (int c = 0; c < NDPP; c++) begin
      dpp_cfg[c] = '0;
      dpp_cfg[c].step_thr = 15'd60; dpp_cfg[c].holdoff = 12'd10; dpp_cfg[c].zc_window = 12'd150;
      dpp_cfg[c].rise_k = 11'(K); dpp_cfg[c].gap_l = 11'(L); dpp_cfg[c].pz_m = 16'(M);
      dpp_cfg[c].peak_delay = 12'd50; dpp_cfg[c].e_shift = 4'(SH);
      dpp_adc[c] = DPP_SAMPLE_W'(BASE);
    end
    trig_mask[0] = 8'h01; trig_mask[1] = 8'h00; board_trig_in = '0;
    dpp_cfg[0].ext_trig_en = 1'b1; dpp_cfg[1].ext_trig_en = 1'b1; dpp_cfg[10].ext_trig_en = 1'b1;
    repeat (3) @(negedge clk_dpp);
    rst_dpp_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk_dpp);
      for (int c = 0; c < NDPP; c++) begin
        real x;
        x = BASE;
        for (int i = 0; i < 5; i++) if (dp[i].ch == c) x += preamp(t, dp[i].t0, dp[i].a);
        dpp_adc[c] = DPP_SAMPLE_W'(int'(x));
      end
      board_trig_in[1] = (t == T_FP);
    end
  end

  // ---------------- fast-timing stimulus and checks ----------------
  real    ft_t0 [longint];     // pulse start on channel 0 by trigger time tag
  int     n_found = 0, n_none = 0, n_lm = 0, n_stall = 0, n_ft_trig = 0, n_pair = 0;
  real    t_ch0 [longint], t_ch1 [longint];
  real    ref_rel, dt_sum = 0.0, dt_sq = 0.0, dt_rms_ps;
  bit     have_ref = 0;
  longint tft = 0;

  function automatic int sc_shape(real t, real t0, real a);
    real u;
    if (t <= t0) return FTB;
    u = t - t0;
    return FTB + int'(a * (1.0 - $exp(-u / 9.0)) * $exp(-u / 200.0));
  endfunction

  always @(posedge clk_ft) if (rst_ft_n) begin
    n_ft_trig += $countones(ft_trig);
    if (lm_valid && !lm_ready) n_stall++;
    if (lm_valid && lm_ready) begin
      real tt;
      n_lm++;
      tt = real'(longint'(lm_event.ttag) - PRE + longint'(lm_event.coarse)) + real'(lm_event.fine) / 1024.0;
      if (!lm_event.found) n_none++;
      else begin
        n_found++;
        if (lm_event.channel == 0) t_ch0[longint'(lm_event.ttag)] = tt;
        if (lm_event.channel == 1) t_ch1[longint'(lm_event.ttag)] = tt;
      end
    end
  end

  // pulse list: start time, amplitude, phase step; channel 2 gets a small pulse
  task automatic ft_run(int cycles, int spacing, int rdy);
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk_ft);
      lm_ready = (rdy != 0);
      begin
        longint base_t;
        real t0, a;
        base_t = tft - (tft % spacing) + 60;
        t0 = real'(base_t) + 0.13 * real'((tft / spacing) % 7);
        a = 300.0 + 100.0 * real'((tft / spacing) % 5);
        ft_adc[0] = CFD_SAMPLE_W'(sc_shape(real'(tft), t0, a));
        ft_adc[1] = CFD_SAMPLE_W'(sc_shape(real'(tft), t0 + 0.37, a));
        ft_adc[2] = CFD_SAMPLE_W'(sc_shape(real'(tft), t0, 70.0));
        ft_adc[3] = CFD_SAMPLE_W'(FTB);
        if (tft % spacing == 60) ft_t0[tft] = t0;
      end
      tft++;
    end
  endtask

  initial begin
    ft_enable = 1'b1; ft_buf_code = 4'd4; ft_post_trig = 12'(POST);
    cfd_delay = 5'd10; cfd_fraction = 8'd77; cfd_arm_thr = 11'd100;
    for (int c = 0; c < NCFD; c++) begin ft_adc[c] = CFD_SAMPLE_W'(FTB); ft_threshold[c] = 10'd100; end
    ft_threshold[2] = 10'd80;
    lm_ready = 1'b1;
    repeat (3) @(negedge clk_ft);
    rst_ft_n = 1'b1;
    ft_run(300, 100000, 1);      // let the pre-trigger parts fill
    ft_run(6000, 400, 1);        // normal running
    ft_run(9000, 400, 0);        // list-mode output held: buffers fill, triggers lost
    ft_run(12000, 400, 1);       // drain
    ft_run(3000, 100000, 1);
    // ---------- fast-timing results ----------
    foreach (t_ch0[tag]) begin
      real rel, dt;
      longint src;
      // the pulse that caused this record: nearest pulse start at or before the tag
      src = -1;
      foreach (ft_t0[s]) if (s <= tag && tag - s < 30) src = s;
      checks++;
      if (src < 0) begin failures++; $display("record at %0d has no pulse", tag); continue; end
      rel = t_ch0[tag] - ft_t0[src];
      if (!have_ref) begin ref_rel = rel; have_ref = 1; end
      if (rel - ref_rel > 0.05 || ref_rel - rel > 0.05) begin
        failures++; $display("channel 0 time walk %f vs %f", rel, ref_rel);
      end
      if (t_ch1.exists(tag) || t_ch1.exists(tag + 1)) begin
        n_pair++;
        dt = (t_ch1.exists(tag) ? t_ch1[tag] : t_ch1[tag + 1]) - t_ch0[tag];
        checks++;
        if (dt < 0.32 || dt > 0.42) begin failures++; $display("pair difference %f", dt); end
        dt_sum += dt; dt_sq += dt * dt;
      end
    end
    // ---------- mechanism counts ----------
    checks++; if (n_dpp_ev != 6 || n_forced != 2) begin
      failures++; $display("dpp events %0d, forced %0d", n_dpp_ev, n_forced); end
    checks++; if (n_pileup != 1) begin failures++; $display("pile-ups %0d", n_pileup); end
    checks++; if (n_board0 == 0 || n_board0 != n_ch0_trig || n_board1 != 1) begin
      failures++; $display("board triggers %0d/%0d (ch0 %0d)", n_board0, n_board1, n_ch0_trig); end
    checks++; if (n_pair < 60) begin failures++; $display("only %0d pairs", n_pair); end
    // spread of the pair difference in ps (1 sample = 1 ns); the algorithm alone
    // must stay well inside the 28 ps measured with the real electronics
    dt_rms_ps = 1000.0 * $sqrt(dt_sq / real'(n_pair) - (dt_sum / real'(n_pair)) ** 2);
    checks++; if (dt_rms_ps > 28.0) begin failures++; $display("pair spread %f ps", dt_rms_ps); end
    checks++; if (n_none == 0) begin failures++; $display("no entry without crossing"); end
    checks++; if (ft_lost_count[0] == 0 || ft_lost_count[1] == 0) begin
      failures++; $display("no lost triggers"); end
    checks++; if (n_stall == 0) begin failures++; $display("output never stalled"); end
    checks++; if (n_lm != n_ft_trig || lm_drop_count != 0) begin
      failures++; $display("list-mode entries %0d for %0d triggers, %0d dropped", n_lm, n_ft_trig, lm_drop_count); end
    $display("mechanisms: dpp events %0d (forced %0d), pile-up %0d, board triggers %0d, ft triggers %0d, found %0d, no crossing %0d, pairs %0d (spread %0.1f ps), lost %0d, stall cycles %0d",
             n_dpp_ev, n_forced, n_pileup, n_board0, n_ft_trig, n_found, n_none, n_pair, dt_rms_ps, ft_lost_count[0], n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
