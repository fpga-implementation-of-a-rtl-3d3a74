// tb_energy_sampler: self-checking test of the flat-top energy measurement.
//
// The test drives synthetic trapezoids directly: a constant offset, a linear rise,
// a flat top and a linear fall, all known exactly. For each pulse the expected
// energy is (flat top - offset) >> e_shift, clipped to 16 bits; the event must be
// seen peak_delay+2 clock edges after the edge that takes the trigger sample. Cases: a clean pulse, a pulse with a
// second trigger on its rising edge (pile-up), a pulse too large for 16 bits
// (saturation) and a negative-going one (clipped to zero).
module tb_energy_sampler;
  import daq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                     trap_valid = 1'b1;
  logic signed [TRAP_W-1:0] trap;
  logic                     trig;
  logic [11:0]              peak_delay;
  logic [3:0]               e_shift;
  logic                     e_valid, pileup;
  logic [ENERGY_W-1:0]      energy;

  energy_sampler dut (.clk, .rst_n, .trap_valid, .trap, .trig, .peak_delay, .e_shift,
                      .e_valid, .energy, .pileup);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam longint OFF = 64'sd123456789;
  longint exp_e;
  bit     exp_pu;
  int     trig_cyc, cyc = 0, n_ev = 0;

  always @(posedge clk) begin
    cyc++;
    if (e_valid) begin
      n_ev++;
      checks++;
      if (longint'(energy) != exp_e || pileup != exp_pu || cyc - trig_cyc != int'(peak_delay) + 2) begin
        failures++;
        $display("energy=%0d pileup=%0b after %0d cycles, expected %0d %0b after %0d",
                 energy, pileup, cyc - trig_cyc, exp_e, exp_pu, int'(peak_delay) + 2);
      end
    end
  end

  // one trapezoid of height h starting now; trigger on sample `tr`, optional 2nd trigger
  task automatic pulse(longint h, int second);
    for (int i = 0; i < 200; i++) begin
      longint v;
      if (i < 20)       v = 0;
      else if (i < 40)  v = h * (i - 20) / 20;
      else if (i < 80)  v = h;
      else if (i < 100) v = h - h * (i - 80) / 20;
      else              v = 0;
      @(negedge clk);
      trap = TRAP_W'(OFF + v);
      trig = (i == 21) || (second != 0 && i == second);
      if (i == 21) trig_cyc = cyc + 1;
    end
  endtask

  function automatic longint expect_e(longint h, int sh);
    longint e = h >>> sh;
    if (e < 0) return 0;
    if (e > 65535) return 65535;
    return e;
  endfunction

  initial begin
    trap = TRAP_W'(OFF); trig = 1'b0; peak_delay = 12'd38; e_shift = 4'd6;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (40) @(negedge clk);
    exp_e = expect_e(64'sd2000000, 6);      exp_pu = 0; pulse(64'sd2000000, 0);
    exp_e = expect_e(64'sd1000000, 6);      exp_pu = 1; pulse(64'sd1000000, 30);
    exp_e = expect_e(64'sd900000000, 6);    exp_pu = 0; pulse(64'sd900000000, 0);
    exp_e = 0;                              exp_pu = 0; pulse(-64'sd500000, 0);
    e_shift = 4'd0;
    exp_e = expect_e(64'sd54321, 0);        exp_pu = 0; pulse(64'sd54321, 0);
    checks++;
    if (n_ev != 5) begin failures++; $display("%0d events instead of 5", n_ev); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
