// tb_cfd_core: self-checking test of the digital constant fraction discriminator.
//
// Records of 256 samples carry scintillator-like pulses (about 20 samples rise,
// 200 samples decay, as from a 1 GS/s digitiser) starting at fractional sample
// positions, with two amplitudes and on a non-zero baseline. For every record the
// test redoes the discriminator in floating point from the same integer samples:
// baseline from the first 16 samples, y[n] = x[n-D] - f x[n], arming, zero
// crossing and linear interpolation. The coarse index must match exactly and the
// fine time to within one step; the result must rise FINE_W clock edges after the
// edge that takes the crossing sample. It also checks the point of the method: the times found for the
// small and the large pulse at the same start position differ by less than 0.05
// sample (50 ps at 1 GS/s). Records without a pulse must report found = 0, and a
// record sent with gaps in in_valid must give the same result as without.
module tb_cfd_core;
  import daq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int RL = 256, D = 10, FR = 77, ARM = 30, BASE = 50;

  logic [4:0]              delay = 5'(D);
  logic [7:0]              fraction = 8'(FR);
  logic [CFD_SAMPLE_W:0]   arm_thr = 11'(ARM);
  logic                    in_valid, in_sop, in_eop;
  logic [CFD_SAMPLE_W-1:0] in_sample;
  logic [TS_W-1:0]         in_ttag;
  logic                    ev_valid;
  cfd_event_t              ev;

  cfd_core dut (.clk, .rst_n, .channel(8'd5), .delay, .fraction, .arm_thr,
                .in_valid, .in_sample, .in_sop, .in_eop, .in_ttag, .ev_valid, .ev);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, in record order
  typedef struct { bit found; int coarse; int fine; longint ttag; int due; } exp_t;
  exp_t q[$];
  int   cyc = 0;
  real  times[int];   // measured time minus start, by record id
  int   n_found = 0, n_none = 0;

  always @(posedge clk) begin
    cyc++;
    if (ev_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("unexpected event");
      end else begin
        e = q.pop_front();
        if (ev.found != e.found || ev.ttag != TS_W'(e.ttag) || ev.channel != 8'd5 ||
            (e.found && (int'(ev.coarse) != e.coarse || int'(ev.fine) - e.fine > 1 ||
                         e.fine - int'(ev.fine) > 1)) ||
            (e.due >= 0 && cyc != e.due)) begin
          failures++;
          $display("record %0d: found=%0b coarse=%0d fine=%0d cyc=%0d, expected %0b %0d %0d cyc=%0d",
                   e.ttag, ev.found, ev.coarse, ev.fine, cyc, e.found, e.coarse, e.fine, e.due);
        end
        if (ev.found) n_found++; else n_none++;
      end
    end
  end

  function automatic int shape(int t, real t0, real a);
    real u;
    if (real'(t) <= t0) return BASE;
    u = real'(t) - t0;
    return BASE + int'(a * (1.0 - $exp(-u / 9.0)) * $exp(-u / 200.0));
  endfunction

  // send one record; returns measured start-relative time via the reference
  task automatic send(longint id, real t0, real a, bit gaps);
    int  x[RL];
    real bl, y[RL], xs;
    bit  armed, found;
    exp_t e;
    int  sent;
    bl = 0.0;
    for (int i = 0; i < RL; i++) x[i] = (a > 0.0) ? shape(i, t0, a) : BASE + int'($urandom % 3);
    for (int i = 0; i < 16; i++) bl += real'(x[i]);
    bl = bl / 16.0;
    for (int i = 0; i < RL; i++) y[i] = (i >= D) ? (real'(x[i-D]) - bl) - real'(FR) / 256.0 * (real'(x[i]) - bl) : 0.0;
    armed = 0; found = 0;
    e.found = 0; e.coarse = 0; e.fine = 0; e.ttag = id; e.due = -1;
    for (int n = 16; n < RL && !found; n++) begin
      xs = real'(x[n]) - bl;
      if (xs > real'(ARM)) armed = 1;
      if (armed && n - 1 >= 16 && y[n-1] <= 0.0 && y[n] > 0.0) begin
        real fr;
        found = 1;
        fr = -y[n-1] / (y[n] - y[n-1]);
        e.found = 1; e.coarse = n - 1; e.fine = int'($floor(fr * 1024.0));
        if (!gaps) e.due = cyc + n + FINE_W + 3;
        times[int'(id)] = real'(n - 1) + fr - t0;
      end
    end
    if (!found && !gaps) e.due = cyc + RL + 2;
    q.push_back(e);
    sent = 0;
    while (sent < RL) begin
      @(negedge clk);
      if (gaps && ($urandom % 3 == 0)) begin
        in_valid = 1'b0;
      end else begin
        in_valid  = 1'b1;
        in_sample = CFD_SAMPLE_W'(x[sent]);
        in_sop    = (sent == 0);
        in_eop    = (sent == RL - 1);
        in_ttag   = TS_W'(id);
        sent++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    in_valid = 1'b0; in_sop = 1'b0; in_eop = 1'b0; in_sample = '0; in_ttag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int p = 0; p < 10; p++) begin
      send(100 + p, 80.0 + 0.1 * p, 300.0, 0);
      send(200 + p, 80.0 + 0.1 * p, 900.0, 0);
    end
    send(300, 0.0, 0.0, 0);
    send(301, 120.37, 600.0, 1);
    send(302, 0.0, 0.0, 1);
    repeat (40) @(negedge clk);
    for (int p = 0; p < 10; p++) begin
      real dt;
      dt = times[100 + p] - times[200 + p];
      checks++;
      if (dt > 0.05 || dt < -0.05) begin
        failures++;
        $display("walk at phase %0d: %f sample", p, dt);
      end
    end
    checks++;
    if (q.size() != 0 || n_found != 21 || n_none != 2) begin
      failures++;
      $display("left %0d, found %0d, none %0d", q.size(), n_found, n_none);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
