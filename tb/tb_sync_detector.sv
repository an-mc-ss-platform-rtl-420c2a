// Testbench for sync_detector. Each trial sends a random length of low-level
// noise, the 256-sample preamble (four periods of the +-256 pattern), then
// five OFDM symbols of 10 prefix + 256 random samples, with +-4 noise on
// everything. Each output sample must equal the input sample DLY samples
// earlier; the first FFT window must start inside the cyclic prefix of the
// first symbol (between prefix sample 4 and the symbol start, i.e. ADV=3
// samples early give the nominal position 7), and every later window must
// follow exactly 266 samples on. A noise-only stretch must not synchronise.
// The autocorrelation handed out at each peak must be real and positive,
// since this channel has no frequency offset.
module tb_sync_detector;
  import mhdr_pkg::*;
  localparam int DLY = 128;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic out_valid, out_first, synced, flat, peak;
  logic signed [11:0] in_i = 0, in_q = 0, out_i, out_q;
  logic [6:0] thr_pct = 7'd68;
  int checks = 0, failures = 0;
  int xi [int], xq [int];
  int n = 0;              // input sample counter
  int first_idx [$];
  int nflat = 0, npeak = 0, nout = 0;

  logic signed [47:0] acor_re, acor_im;
  logic acor_valid;

  sync_detector #(.DW(12)) dut (.*);

  // with no frequency offset in this channel, the autocorrelation handed out
  // at each peak must be real and positive
  always @(posedge clk) if (acor_valid) begin
    checks++;
    if (acor_re <= 0 || acor_im > acor_re / 16 || -acor_im > acor_re / 16) begin
      failures++;
      $display("FAIL autocorrelation at peak %0d %0d", acor_re, acor_im);
    end
  end
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      if (flat) nflat++;
      if (peak) npeak++;
      if (out_valid) begin
        checks++;
        nout++;
        if (out_i != xi[n-DLY] || out_q != xq[n-DLY]) begin
          failures++; $display("FAIL output %0d is not input %0d", n, n - DLY);
        end
        if (out_first) first_idx.push_back(n - DLY);
      end
      n++;
    end
  end

  function automatic int noise();
    return $signed($urandom_range(0, 8)) - 4;
  endfunction

  task automatic send(input int vi, input int vq);
    @(negedge clk);
    in_valid = 1;
    in_i = 12'(vi); in_q = 12'(vq);
    xi[n] = vi; xq[n] = vq;
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic trial(input int lead);
    int sym [266], symq [266];
    int pre_end, d;
    first_idx.delete();
    for (int k = 0; k < lead; k++) send(noise(), noise());
    for (int k = 0; k < PRE_LEN; k++)
      send((PRE_SIGN_I[k % PRE_PERIOD] ? -256 : 256) + noise(), (PRE_SIGN_Q[k % PRE_PERIOD] ? -256 : 256) + noise());
    pre_end = n;
    for (int s = 0; s < 5; s++) begin
      for (int k = 0; k < 256; k++) begin
        sym[10+k]  = $signed($urandom_range(0, 600)) + $signed($urandom_range(0, 600)) - 600;
        symq[10+k] = $signed($urandom_range(0, 600)) + $signed($urandom_range(0, 600)) - 600;
      end
      for (int k = 0; k < 10; k++) begin sym[k] = sym[256+k]; symq[k] = symq[256+k]; end
      for (int k = 0; k < 266; k++) send(sym[k] + noise(), symq[k] + noise());
    end
    for (int k = 0; k < DLY + 20; k++) send(noise(), noise());
    checks++;
    if (first_idx.size() < 5) begin
      failures++; $display("FAIL lead %0d: %0d windows", lead, first_idx.size());
    end else begin
      d = first_idx[0] - pre_end;
      checks++;
      if (d < 4 || d > 10) begin failures++; $display("FAIL lead %0d: window starts at prefix sample %0d", lead, d); end
      for (int s = 1; s < 5; s++) begin
        checks++;
        if (first_idx[s] != first_idx[0] + 266 * s) begin failures++; $display("FAIL window %0d misplaced", s); end
      end
    end
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // noise only: no synchronisation
    for (int k = 0; k < 3000; k++) send(noise() * 8, noise() * 8);
    checks++;
    if (nout != 0 || synced) begin failures++; $display("FAIL synchronised on noise"); end
    for (int t = 0; t < 6; t++) trial($urandom_range(100, 700));
    checks++;
    if (nflat == 0 || npeak == 0) begin failures++; $display("FAIL flat/peak indications missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
