// Testbench for cfo_corrector.
// Estimation: for a set of offsets eps (cycles per sample) inside the
// +-1/128 range, the autocorrelation C = A*exp(j*2*pi*64*eps) is loaded with
// `est`, in all four quadrants and at two magnitudes; the step must equal
// -eps*2^24 within 4 LSB and must appear within 20 cycles.
// Correction: a tone A*exp(j*2*pi*eps*n) is passed with `run` high and one
// `tick` per sample; the n-th output (one cycle after its input) must be
// A*exp(j*2*pi*n*(eps + step/2^24)), i.e. close to the constant A, within
// 12 LSB, for 2000 samples. `run` falling must restart the phase at zero.
module tb_cfo_corrector;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, est = 0, run = 0, tick = 0, in_valid = 0, in_first = 0;
  logic signed [47:0] c_re = 0, c_im = 0;
  logic signed [11:0] in_i = 0, in_q = 0;
  logic out_valid, out_first;
  logic signed [11:0] out_i, out_q;
  logic signed [23:0] step;
  int checks = 0, failures = 0;

  cfo_corrector dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic estimate(input real eps, input real amp);
    real th;
    int want;
    th = 2.0 * PI * 64.0 * eps;
    @(negedge clk);
    c_re = 48'(longint'(amp * $cos(th)));
    c_im = 48'(longint'(amp * $sin(th)));
    est = 1;
    @(negedge clk);
    est = 0;
    repeat (20) @(negedge clk);
    want = $rtoi(-eps * 16777216.0);
    check(step - want <= 4 && want - step <= 4,
          $sformatf("eps %f: step %0d, expected %0d", eps, step, want));
  endtask

  task automatic correct(input real eps, input int n_samp);
    real a, ang;
    int ei, eq;
    a = 1000.0;
    @(negedge clk);
    run = 1;
    for (int n = 0; n < n_samp; n++) begin
      in_i = 12'($rtoi(a * $cos(2.0 * PI * eps * n)));
      in_q = 12'($rtoi(a * $sin(2.0 * PI * eps * n)));
      in_valid = 1; tick = 1; in_first = (n == 0);
      @(negedge clk);
      in_valid = 0; tick = 0; in_first = 0;
      ang = 2.0 * PI * n * (eps + real'(step) / 16777216.0);
      ei = $rtoi(a * $cos(ang));
      eq = $rtoi(a * $sin(ang));
      check(out_valid && out_first == (n == 0), "output valid one cycle after input");
      check(out_i - ei <= 12 && ei - out_i <= 12 && out_q - eq <= 12 && eq - out_q <= 12,
            $sformatf("sample %0d: got %0d %0d, expected %0d %0d", n, out_i, out_q, ei, eq));
      // a sample every other cycle
      @(negedge clk);
      check(!out_valid, "no output without input");
    end
    run = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    estimate(0.0, 1.0e9);
    estimate(0.001, 1.0e9);
    estimate(-0.001, 1.0e9);
    estimate(0.0015, 3.0e12);
    estimate(-0.003, 3.0e12);
    estimate(0.005, 1.0e6);
    estimate(-0.0065, 1.0e9);   // angle beyond 90 degrees: second/third quadrant
    estimate(0.0072, 1.0e9);
    estimate(-0.0077, 1.0e9);
    // the step is held while the receiver runs
    estimate(0.002, 1.0e9);
    @(negedge clk);
    run = 1;
    c_re = 48'sd1000000000; c_im = 0; est = 1;
    @(negedge clk);
    est = 0;
    repeat (20) @(negedge clk);
    check(step - $rtoi(-0.002 * 16777216.0) <= 4 && $rtoi(-0.002 * 16777216.0) - step <= 4,
          "step held while running");
    run = 0;
    @(negedge clk);
    // correction with the step in place
    estimate(0.002, 1.0e9);
    correct(0.002, 2000);
    estimate(-0.0061, 2.0e10);
    correct(-0.0061, 2000);
    // after run fell the phase starts again from zero
    correct(-0.0061, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
