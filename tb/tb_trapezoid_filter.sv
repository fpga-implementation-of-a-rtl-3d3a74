// tb_trapezoid_filter: self-checking test of the trapezoidal shaper.
//
// Phase 1 feeds a constant baseline B from reset: the double accumulation turns it
// into the filter's own constant output offset, which, worked out by hand, is
// exactly B*k*l once k+l samples are in. Phase 2 adds a preamplifier-like step
// A*(M/(M+1))^n whose decay matches the pole-zero constant M. The trapezoid must
// then leave the offset exactly two clock edges after the step sample is applied,
// rise for k samples to a flat top of A*(M+1)*k above the offset, stay flat for
// l-k samples and fall back to the offset; the test
// checks the start cycle exactly and the flat top and the return to zero to within
// the rounding of the integer input samples.
module tb_trapezoid_filter;
  import daq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int K = 40, L = 64, M = 150, A = 3000, B = 2500, T0 = 400;

  logic                     in_valid = 1'b1;
  logic [DPP_SAMPLE_W-1:0]  sample;
  logic                     trap_valid;
  logic signed [TRAP_W-1:0] trap;

  trapezoid_filter #(.MAX_LEN(256)) dut (.clk, .rst_n, .in_valid, .sample,
    .k(11'(K)), .l(11'(L)), .m(16'(M)), .trap_valid, .trap);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // trap seen at the negedge after sample t was applied at negedge t
  // seen[t]: output after the clock edge that took sample t
  longint seen [int];

  initial begin
    real top, tol, off;
    int first_nz;
    sample = DPP_SAMPLE_W'(B);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1400; t++) begin
      real v;
      v = B;
      if (t >= T0) v += A * ((real'(M) / real'(M + 1)) ** real'(t - T0));
      @(negedge clk);
      if (t > 0) seen[t-1] = trap;
      sample = DPP_SAMPLE_W'(int'(v));
    end
    @(negedge clk);
    off = real'(B) * real'(K) * real'(L);
    top = real'(A) * real'(M + 1) * real'(K);
    tol = 0.002 * top;
    // exact zero on a constant input after the transient
    for (int t = K + L; t < T0 + 1; t++) begin
      checks++;
      if (seen[t] != longint'(B) * K * L) begin
        failures++;
        $display("baseline not zero at %0d: %0d", t, seen[t]);
        break;
      end
    end
    // start of the trapezoid: sample T0 reaches the output one sample later
    first_nz = -1;
    for (int t = T0; t < T0 + 10; t++)
      if (first_nz < 0 && seen[t] != longint'(B) * K * L) first_nz = t;
    checks++;
    if (first_nz != T0 + 1) begin
      failures++;
      $display("trapezoid starts at %0d, expected %0d", first_nz, T0 + 1);
    end
    // flat top
    for (int t = T0 + K; t <= T0 + L; t++) begin
      checks++;
      if (real'(seen[t]) - off < top - tol || real'(seen[t]) - off > top + tol) begin
        failures++;
        $display("flat top at %0d: %0d expected %0f", t, seen[t], top);
      end
    end
    // rising edge halfway
    checks++;
    if (real'((seen[T0 + K/2] - longint'(off))) < 0.45 * top || real'((seen[T0 + K/2] - longint'(off))) > 0.55 * top) begin
      failures++;
      $display("rising edge wrong: %0d", (seen[T0 + K/2] - longint'(off)));
    end
    // back to zero after the trapezoid
    for (int t = T0 + K + L; t < 1390; t++) begin
      checks++;
      if (real'(seen[t]) - off > tol || real'(seen[t]) - off < -tol) begin
        failures++;
        $display("tail not zero at %0d: %0d", t, seen[t]);
        break;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
