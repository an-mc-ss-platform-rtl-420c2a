// Testbench for fft_core. Two 256-point instances, forward (no scaling) and
// inverse (divide by N), are fed random complex vectors and a few special
// vectors (impulse, single tone); every output is compared against a direct
// DFT computed here in real arithmetic. The tolerance covers 16-bit twiddle
// rounding and the per-stage rounding of the inverse transform. Output
// stalls are random.
module tb_fft_core;
  localparam int N = 256;
  logic clk = 0, rst_n = 0;
  logic fv = 0, iv = 0, f_in_ready, i_in_ready, f_ov, i_ov, f_first, i_first;
  logic f_or = 0, i_or = 0;
  logic signed [19:0] f_ii = 0, f_iq = 0, i_ii = 0, i_iq = 0, f_oi, f_oq, i_oi, i_oq;
  int checks = 0, failures = 0;
  real xr [N], xi [N];
  localparam real PI = 3.14159265358979323846;

  fft_core #(.N(N), .DW(20), .INVERSE(1'b0)) u_f (.clk, .rst_n, .in_valid(fv), .in_ready(f_in_ready),
    .in_i(f_ii), .in_q(f_iq), .out_valid(f_ov), .out_ready(f_or), .out_i(f_oi), .out_q(f_oq), .out_first(f_first));
  fft_core #(.N(N), .DW(20), .INVERSE(1'b1)) u_i (.clk, .rst_n, .in_valid(iv), .in_ready(i_in_ready),
    .in_i(i_ii), .in_q(i_iq), .out_valid(i_ov), .out_ready(i_or), .out_i(i_oi), .out_q(i_oq), .out_first(i_first));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one transform through the chosen instance and checks all N outputs.
  task automatic run(input bit inv, input real tol);
    real yr, yi, a, er, ei;
    int k = 0;
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      if (inv) begin iv = 1; i_ii = 20'($rtoi(xr[n])); i_iq = 20'($rtoi(xi[n])); end
      else     begin fv = 1; f_ii = 20'($rtoi(xr[n])); f_iq = 20'($rtoi(xi[n])); end
      @(posedge clk);
      while (!(inv ? i_in_ready : f_in_ready)) @(posedge clk);
      @(negedge clk);
      iv = 0; fv = 0;
    end
    while (k < N) begin
      if (inv) i_or = ($urandom_range(0, 2) != 0); else f_or = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (inv ? (i_ov && i_or) : (f_ov && f_or)) begin
        yr = 0.0; yi = 0.0;
        for (int n = 0; n < N; n++) begin
          a = (inv ? 2.0 : -2.0) * PI * real'((k * n) % N) / N;
          yr += real'($rtoi(xr[n])) * $cos(a) - real'($rtoi(xi[n])) * $sin(a);
          yi += real'($rtoi(xr[n])) * $sin(a) + real'($rtoi(xi[n])) * $cos(a);
        end
        if (inv) begin yr /= N; yi /= N; end
        er = real'(inv ? i_oi : f_oi) - yr;
        ei = real'(inv ? i_oq : f_oq) - yi;
        checks++;
        if (er > tol || er < -tol || ei > tol || ei < -tol || (k == 0) != (inv ? i_first : f_first)) begin
          failures++;
          $display("FAIL inv=%0d bin %0d got (%0d,%0d) want (%f,%f)", inv, k,
                   inv ? i_oi : f_oi, inv ? i_oq : f_oq, yr, yi);
        end
        k++;
      end
      @(negedge clk);
    end
    i_or = 0; f_or = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // impulse: flat spectrum
    for (int n = 0; n < N; n++) begin xr[n] = (n == 0) ? 1000.0 : 0.0; xi[n] = 0.0; end
    run(0, 2.0);
    // single tone at bin 37
    for (int n = 0; n < N; n++) begin xr[n] = $floor(1000.0 * $cos(2.0 * PI * 37 * n / N)); xi[n] = $floor(1000.0 * $sin(2.0 * PI * 37 * n / N)); end
    run(0, 80.0);
    for (int t = 0; t < 4; t++) begin
      for (int n = 0; n < N; n++) begin
        xr[n] = real'($signed($urandom_range(0, 2000)) - 1000);
        xi[n] = real'($signed($urandom_range(0, 2000)) - 1000);
      end
      run(0, 80.0);
    end
    // inverse: OFDM-like input (sparse +-4096 bins) and random full-scale input
    for (int n = 0; n < N; n++) begin xr[n] = (n % 3 == 0) ? 4096.0 : -4096.0; xi[n] = 0.0; end
    run(1, 3.0);
    for (int t = 0; t < 3; t++) begin
      for (int n = 0; n < N; n++) begin
        xr[n] = real'($signed($urandom_range(0, 400000)) - 200000);
        xi[n] = real'($signed($urandom_range(0, 400000)) - 200000);
      end
      run(1, 4.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
