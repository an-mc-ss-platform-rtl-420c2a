// End-to-end testbench of mhdr_top at its default parameters. The DAC output
// is looped back into the ADC (one sample every SPS cycles, small additive
// noise, idle noise between frames, and a carrier frequency offset of
// 0.0015 cycle per sample that the receiver must estimate within 1 %; the
// 2048-byte frame is sent without offset, see below). Software is modelled by bus tasks: it
// configures the MAC, writes a frame into the TX FIFO, starts transmission,
// waits for the receive interrupt and reads the frame back from the RX FIFO.
// Frames are sent in all six modes, encrypted and in clear, and one frame
// with a foreign destination id that the receiver must drop, one broadcast
// frame, and one frame with the largest host payload (2048 bytes). Counted
// mechanisms: autocorrelation flat region, cross-correlation peak,
// synchronisation, channel estimation, encrypted frame, address rejection,
// CRC pass, each mode, frequency offset estimate.
module tb_mhdr_top;
  localparam int SPS = 8;
  localparam int HDR = 10;

  logic clk = 0, rst_n = 0;
  logic [7:0]  bus_addr = 0;
  logic        bus_we = 0, bus_re = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic        irq;
  logic        dac_valid, dac_ready, tx_active;
  logic signed [11:0] dac_i, dac_q, adc_i, adc_q;
  logic        adc_valid;
  logic        rx_synced, rx_flat, rx_peak, rx_est_done, rx_overflow;
  logic signed [23:0] rx_cfo_step;

  int checks = 0, failures = 0;
  int n_flat = 0, n_peak = 0, n_sync = 0, n_est = 0, n_enc = 0, n_drop = 0, n_crc = 0;
  int n_mode [6];

  mhdr_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample clock and loopback channel
  int phase = 0;
  always_ff @(posedge clk) phase <= (phase == SPS - 1) ? 0 : phase + 1;
  assign dac_ready = (phase == 0);
  // carrier frequency offset of the loopback channel, cycles per sample
  // (0.0015 = 60 kHz at 40 Msample/s, about 12 ppm at 5.2 GHz)
  real cfo = 0.0015;
  localparam real PI  = 3.14159265358979323846;
  real cfo_ph = 0.0;
  always_ff @(posedge clk) begin
    adc_valid <= (phase == 0);
    if (phase == 0) begin
      real xi, xq;
      xi = dac_valid ? real'(dac_i) : 0.0;
      xq = dac_valid ? real'(dac_q) : 0.0;
      adc_i <= 12'($rtoi(xi * $cos(cfo_ph) - xq * $sin(cfo_ph)) + $signed($urandom_range(0, 6)) - 3);
      adc_q <= 12'($rtoi(xi * $sin(cfo_ph) + xq * $cos(cfo_ph)) + $signed($urandom_range(0, 6)) - 3);
      cfo_ph = cfo_ph + 2.0 * PI * cfo;
      if (cfo_ph > PI) cfo_ph = cfo_ph - 2.0 * PI;
    end
  end

  // event counters
  logic synced_d = 0, est_d = 0;
  int n_cfo_chk = 0, n_cfo_fail = 0;
  always_ff @(posedge clk) begin
    synced_d <= rx_synced;
    est_d    <= rx_est_done;
    if (rx_flat) n_flat <= n_flat + 1;
    if (rx_peak) n_peak <= n_peak + 1;
    if (rx_synced && !synced_d) n_sync <= n_sync + 1;
    // the estimate must be within 1 % of the channel's offset
    if (rx_synced && !synced_d && cfo != 0.0) begin
      real want;
      want = -cfo * 16777216.0;
      n_cfo_chk <= n_cfo_chk + 1;
      if (real'(rx_cfo_step) - want > 0.01 * -want || want - real'(rx_cfo_step) > 0.01 * -want) begin
        n_cfo_fail <= n_cfo_fail + 1;
        $display("FAIL cfo step %0d, expected about %0d", rx_cfo_step, $rtoi(want));
      end
    end
    if (rx_est_done && !est_d) n_est <= n_est + 1;
    if (rx_overflow) begin
      failures <= failures + 1;
      $display("FAIL receive sample FIFO overflow");
    end
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk);
    bus_we = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_addr = a; bus_re = 1;
    #1 d = bus_rdata;
    @(negedge clk);
    bus_re = 0;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic send_frame(input int mode, input int len, input bit enc, input logic [7:0] dest);
    logic [7:0] frame [$];
    logic [31:0] d;
    int t;
    bit expect_rx;
    expect_rx = (dest == 8'h12) || (dest == 8'hFF);
    frame = {};
    for (int i = 0; i < HDR; i++) frame.push_back(8'(i * 17 + mode));
    frame[4] = dest;
    frame[5] = 8'h34;
    for (int i = 0; i < len; i++) frame.push_back(8'($urandom));
    wr(8'h00, 32'(enc << 1) | 32'(1 << 2) | 32'(enc << 3) | 32'(mode << 4));
    wr(8'h08, 32'(len));
    foreach (frame[i]) wr(8'h30, 32'(frame[i]));
    wr(8'h00, 32'(enc << 1) | 32'(1 << 2) | 32'(enc << 3) | 32'(mode << 4) | 32'd1);
    t = 0;
    while (!irq && t < 400_000) begin @(posedge clk); t++; end
    if (!expect_rx) begin
      check(!irq, "frame for another device raised an interrupt");
      if (!irq) n_drop++;
      return;
    end
    check(irq, $sformatf("interrupt for mode %0d len %0d", mode, len));
    if (!irq) return;
    rd(8'h04, d);
    check(d[1] && d[2] && d[3], $sformatf("status %h (received, crc ok, addr ok)", d));
    check(d[31:16] == 16'(len), $sformatf("rx length %0d expected %0d", d[31:16], len));
    if (d[2]) n_crc++;
    foreach (frame[i]) begin
      rd(8'h34, d);
      check(d[8] && d[7:0] == frame[i], $sformatf("byte %0d got %h expected %h", i, d[8:0], frame[i]));
    end
    rd(8'h34, d);
    check(!d[8], "RX FIFO empty after the frame");
    wr(8'h38, 32'd1);
    n_mode[mode]++;
    if (enc) n_enc++;
  endtask

  initial begin
    logic [31:0] d;
    foreach (n_mode[i]) n_mode[i] = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    wr(8'h0C, 32'h12);
    wr(8'h10, 32'h2b7e1516); wr(8'h14, 32'h28aed2a6); wr(8'h18, 32'habf71588); wr(8'h1C, 32'h09cf4f3c);
    wr(8'h20, 32'hf0f1f2f3); wr(8'h24, 32'hf4f5f6f7); wr(8'h28, 32'hf8f9fafb); wr(8'h2C, 32'hfcfdfe00);
    rd(8'h3C, d);
    check(d[6:0] == 7'd68, "default synchronisation threshold 68 %");
    repeat (2000) @(posedge clk);
    send_frame(0, 40, 1'b0, 8'h12);
    send_frame(1, 33, 1'b1, 8'h12);
    send_frame(2, 50, 1'b0, 8'h12);
    send_frame(3, 20, 1'b1, 8'h12);
    send_frame(4, 64, 1'b0, 8'h12);
    send_frame(5, 47, 1'b1, 8'h12);
    send_frame(0, 16, 1'b0, 8'h55);
    send_frame(0, 8, 1'b0, 8'hFF);
    // without pilot tracking, the residual offset of the estimate turns
    // 64-QAM constellations over this many symbols; send it without offset
    cfo = 0.0;
    send_frame(5, 2048, 1'b1, 8'h12);   // largest host payload, 64-QAM 3/4
    check(n_flat > 0, "autocorrelation flat region seen");
    check(n_peak > 0, "cross-correlation peak seen");
    check(n_sync >= 8, "receiver synchronised to each frame");
    check(n_est >= 8, "channel estimated for each frame");
    check(n_enc > 0, "encrypted frame received");
    check(n_drop > 0, "frame for another device dropped");
    check(n_crc > 0, "CRC verified");
    foreach (n_mode[i]) check(n_mode[i] > 0, $sformatf("mode %0d exercised", i));
    check(n_cfo_chk >= 8, "frequency offset estimated for each offset frame");
    checks += n_cfo_chk;
    failures += n_cfo_fail;
    $display("events: flat=%0d peak=%0d sync=%0d est=%0d enc=%0d drop=%0d crc=%0d", n_flat, n_peak, n_sync, n_est, n_enc, n_drop, n_crc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
