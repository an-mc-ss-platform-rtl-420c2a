// Testbench for rx_baseband. The transmitter (tx_baseband) is used as the
// signal source: one sample every 8 cycles goes through a channel model and
// into the receiver, with +-3 noise added and low-level noise between
// frames. Channel cases: direct, and a two-path channel
// y[n] = x[n] + x[n-2]/2 - x[n-5]/4 that the equaliser has to undo.
// For every mode, frames of random bytes must come out of the receiver
// byte for byte, with out_first on the first byte and out_len equal to the
// frame length; sync indications, the channel-estimate flag and the
// absence of sample overflow are checked.
module tb_rx_baseband;
  logic clk = 0, rst_n = 0;
  // transmitter
  logic start = 0, busy, byte_valid = 0, byte_ready, dac_valid, dac_ready, dac_pre;
  logic [15:0] frame_len = 0;
  logic [2:0] mode = 0;
  logic [7:0] byte_data = 0;
  logic signed [11:0] dac_i, dac_q;
  // receiver
  logic enable = 0, adc_valid = 0, out_valid, out_ready = 1, out_first;
  logic signed [11:0] adc_i = 0, adc_q = 0;
  logic [7:0] out_data;
  logic [15:0] out_len;
  logic synced, sync_flat, sync_peak, chan_est_done, sample_overflow;
  logic signed [23:0] cfo_step;
  int checks = 0, failures = 0;

  tx_baseband #(.PAD_MIN(40)) u_tx (.clk, .rst_n, .start, .frame_len, .mode, .busy,
    .byte_valid, .byte_ready, .byte_data, .dac_valid, .dac_ready, .dac_i, .dac_q, .dac_pre);
  rx_baseband dut (.clk, .rst_n, .enable, .mode, .sync_thr(7'd68), .adc_valid, .adc_i, .adc_q,
    .out_valid, .out_ready, .out_data, .out_first, .out_len, .synced, .sync_flat, .sync_peak,
    .chan_est_done, .sample_overflow, .cfo_step);

  always #5 clk = ~clk;
  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample clock and channel
  bit multipath = 0;
  int phase = 0;
  int hi [6], hq [6];
  assign dac_ready = (phase == 0);
  always @(posedge clk) begin
    phase <= (phase + 1) % 8;
    adc_valid <= (phase == 0);
    if (phase == 0) begin
      int xi, xq, yi, yq;
      xi = dac_valid ? int'(dac_i) : 0;
      xq = dac_valid ? int'(dac_q) : 0;
      for (int k = 5; k > 0; k--) begin hi[k] = hi[k-1]; hq[k] = hq[k-1]; end
      hi[0] = xi; hq[0] = xq;
      yi = multipath ? hi[0] + hi[2] / 2 - hi[5] / 4 : hi[0];
      yq = multipath ? hq[0] + hq[2] / 2 - hq[5] / 4 : hq[0];
      yi += $signed($urandom_range(0, 6)) - 3;
      yq += $signed($urandom_range(0, 6)) - 3;
      adc_i <= 12'(yi > 2047 ? 2047 : yi < -2047 ? -2047 : yi);
      adc_q <= 12'(yq > 2047 ? 2047 : yq < -2047 ? -2047 : yq);
    end
  end

  logic [7:0] got [$];
  int firsts = 0, lastlen = 0, nflat = 0, npeak = 0, nest = 0, novf = 0;
  logic est_q = 1;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      got.push_back(out_data);
      if (out_first) begin firsts++; lastlen = out_len; end
    end
    if (rst_n && sync_flat) nflat++;
    if (rst_n && sync_peak) npeak++;
    if (rst_n && sample_overflow) novf++;
    est_q <= chan_est_done;
    if (rst_n && chan_est_done && !est_q) nest++;
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL mode %0d mp %0d: %s", mode, multipath, s); end
  endtask

  task automatic frame(input int m, input int len);
    logic [7:0] sent [$];
    int bad = 0, f0 = firsts, e0 = nest;
    got.delete();
    for (int k = 0; k < len; k++) sent.push_back(8'($urandom));
    @(negedge clk);
    mode = 3'(m); frame_len = 16'(len);
    enable = 0;
    @(negedge clk);
    enable = 1;
    repeat (8 * $urandom_range(50, 300)) @(negedge clk);   // idle noise
    start = 1;
    @(negedge clk);
    start = 0;
    foreach (sent[k]) begin
      byte_valid = 1; byte_data = sent[k];
      @(posedge clk);
      while (!byte_ready) @(posedge clk);
      @(negedge clk);
      byte_valid = 0;
    end
    while (busy) @(negedge clk);
    repeat (8 * 1200) @(negedge clk);
    chk(got.size() == len, $sformatf("%0d bytes received of %0d", got.size(), len));
    foreach (sent[k]) if (k < got.size() && got[k] != sent[k]) bad++;
    chk(bad == 0, $sformatf("%0d byte errors", bad));
    chk(firsts == f0 + 1 && lastlen == len, "out_first / out_len");
    chk(nest == e0 + 1, "channel estimated once");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 6; m++) frame(m, 20 + 37 * m);
    multipath = 1;
    for (int m = 0; m < 6; m += 2) frame(m, 90);
    frame(1, 90);
    frame(5, 90);
    chk(nflat > 0 && npeak > 0, "sync indications");
    chk(novf == 0, "no sample overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
