// Testbench for chan_est_eq. A random complex channel gain H (magnitude
// 0.6..1.6, any phase) is drawn per bin. The first symbol after clear is the
// full-pilot symbol X*H (X = +-4096 BPSK on the used bins); the next three
// symbols carry random values D*H. The equalised output must give back D on
// every used bin within a tolerance set by the 12-bit coefficients, and 0 on
// null bins; no output may appear for the pilot symbol; est_done must rise
// after it. Output stalls are random. A second run after clear with a flat
// channel must return D almost exactly.
module tb_chan_est_eq;
  import mhdr_pkg::*;
  localparam logic [N_FFT-1:0] USED = used_mask();
  localparam logic [N_FFT-1:0] SIGN = sign_mask();
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_ready = 0;
  logic in_ready, out_valid, out_first, est_done;
  logic signed [19:0] in_i = 0, in_q = 0, out_i, out_q;
  int checks = 0, failures = 0;
  real hr [256], hi [256];
  int dr [$], di [$], used_q [$];
  int outs = 0;
  real tol;

  chan_est_eq #(.DW(20)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    if (rst_n && !clear && out_valid && out_ready) begin
      automatic int er = int'(out_i) - dr[0], ei = int'(out_q) - di[0];
      checks++;
      if ((outs % 256 == 0) != out_first || er > tol || er < -tol || ei > tol || ei < -tol) begin
        failures++;
        $display("FAIL bin %0d got (%0d,%0d) want (%0d,%0d)", outs % 256, out_i, out_q, dr[0], di[0]);
      end
      void'(dr.pop_front()); void'(di.pop_front());
      outs++;
    end
  end

  task automatic put(input real vr, input real vi);
    in_valid = 1;
    in_i = 20'($rtoi(vr >= 0 ? vr + 0.5 : vr - 0.5));
    in_q = 20'($rtoi(vi >= 0 ? vi + 0.5 : vi - 0.5));
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic run(input bit flat_ch);
    real x, m, a, vr, vi;
    for (int k = 0; k < 256; k++) begin
      m = flat_ch ? 1.0 : 0.6 + real'($urandom_range(0, 1000)) / 1000.0;
      a = flat_ch ? 0.0 : 2.0 * PI * real'($urandom_range(0, 1000)) / 1000.0;
      hr[k] = m * $cos(a); hi[k] = m * $sin(a);
    end
    tol = flat_ch ? 3.0 : 14.0;
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    checks++;
    if (est_done) begin failures++; $display("FAIL est_done before pilot symbol"); end
    for (int k = 0; k < 256; k++) begin
      x = !USED[k] ? 0.0 : SIGN[k] ? -4096.0 : 4096.0;
      put(x * hr[k], x * hi[k]);
    end
    checks++;
    if (!est_done || outs != 0) begin failures++; $display("FAIL after pilot symbol: est_done %0d outs %0d", est_done, outs); end
    for (int s = 0; s < 3; s++)
      for (int k = 0; k < 256; k++) begin
        vr = USED[k] ? real'($signed($urandom_range(0, 4000)) - 2000) : 0.0;
        vi = USED[k] ? real'($signed($urandom_range(0, 4000)) - 2000) : 0.0;
        dr.push_back($rtoi(vr)); di.push_back($rtoi(vi));
        put(vr * hr[k] - vi * hi[k] + real'($urandom_range(0, 2)) - 1.0,
            vr * hi[k] + vi * hr[k]);
      end
    repeat (20) @(negedge clk);
    checks++;
    if (outs != 3 * 256) begin failures++; $display("FAIL %0d outputs", outs); end
    outs = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0);
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
