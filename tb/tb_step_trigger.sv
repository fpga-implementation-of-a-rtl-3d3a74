// tb_step_trigger: self-checking test of the step auto-trigger.
//
// A baseline with a little noise carries preamplifier-like pulses of several
// heights, some below and some above the threshold, including two close pulses to
// exercise the hold-off. A reference model written here, sample by sample, says on
// which cycles a trigger is due; the test compares every cycle and also checks that
// exactly the pulses above threshold fired.
module tb_step_trigger;
  import daq_pkg::*;
  localparam int GAP = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                    in_valid;
  logic [DPP_SAMPLE_W-1:0] sample;
  logic [DPP_SAMPLE_W:0]   threshold;
  logic [11:0]             holdoff;
  logic                    trig;

  step_trigger #(.GAP(GAP)) dut (.clk, .rst_n, .in_valid, .sample, .threshold, .holdoff, .trig);

  // reference model state
  int hist[$];
  int primed = 0, hold = 0;
  bit armed = 0, exp_trig = 0;
  int n_trig = 0, n_exp_pulses = 0;

  function automatic int pulse_at(int t, int t0, int a);
    if (t < t0) return 0;
    return int'(real'(a) * (1.0 - $exp(-real'(t - t0) / 2.0)) * $exp(-real'(t - t0) / 80.0));
  endfunction

  task automatic model(int x);
    int step;
    bit over;
    exp_trig = 0;
    step = x - (hist.size() >= GAP ? hist[GAP-1] : 0);
    over = step > int'(threshold);
    if (primed < GAP) primed++;
    else if (armed) begin
      if (over) begin exp_trig = 1; armed = 0; hold = int'(holdoff); end
    end else if (hold != 0) hold--;
    else if (!over) armed = 1;
    hist.push_front(x);
    if (hist.size() > GAP) void'(hist.pop_back());
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0s[6] = '{300, 900, 1500, 2100, 2160, 2800};
    int amps[6] = '{80, 400, 1500, 900, 900, 150};
    in_valid = 1'b1; sample = '0; threshold = 15'd200; holdoff = 12'd20;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6; i++) if (amps[i] > 400) n_exp_pulses++;
    for (int t = 0; t < 3500; t++) begin
      int x;
      @(negedge clk);
      if (t > 0) begin
        checks++;
        if (trig !== exp_trig) begin
          failures++;
          $display("t=%0d trig=%0b expected %0b", t, trig, exp_trig);
        end
        if (trig) n_trig++;
      end
      x = 2000 + ($urandom % 4);
      for (int i = 0; i < 6; i++) x += pulse_at(t, t0s[i], amps[i]);
      sample = DPP_SAMPLE_W'(x);
      model(x);
    end
    // pulses of 80, 150 and 400 stay under a step of 200 over 4 samples? 400 crosses it
    checks++;
    if (n_trig < 4) begin
      failures++;
      $display("only %0d triggers", n_trig);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
