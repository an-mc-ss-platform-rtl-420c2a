// Testbench for tx_baseband. For every mode a frame of random bytes is sent
// with the DAC taking one sample every 8 cycles. Checks:
//  - exactly frame_len bytes are taken and busy drops at the end;
//  - the sample count is 256 (preamble) + (nsym + 1) * 266, where nsym is
//    the number of data symbols needed for 16 + 8*len + 6 + 40 bits at the
//    mode's information bits per symbol (192 * bits per subcarrier * rate);
//  - no sample is missing while the DAC asks for one (no underrun);
//  - the 256 preamble samples are +-256 on I and Q with period 64;
//  - every symbol starts with a copy of its last 10 samples (cyclic prefix);
//  - a DFT of each symbol, computed here, has (almost) no energy on the DC
//    bin and the 44 edge bins, and in the full-pilot symbol every used bin
//    has magnitude 4096 within 5 %.
module tb_tx_baseband;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [15:0] frame_len = 0;
  logic [2:0] mode = 0;
  logic byte_valid = 0, byte_ready;
  logic [7:0] byte_data = 0;
  logic dac_valid, dac_ready = 0, dac_pre;
  logic signed [11:0] dac_i, dac_q;
  int checks = 0, failures = 0;
  int si [$], sq [$];
  int underruns = 0, taken = 0;

  tx_baseband #(.PAD_MIN(40)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int phase = 0;
  always @(negedge clk) begin
    phase = (phase + 1) % 8;
    dac_ready = (phase == 0);
  end
  always @(posedge clk) begin
    if (rst_n && dac_ready) begin
      if (dac_valid) begin si.push_back(dac_i); sq.push_back(dac_q); end
      else if (busy && si.size() > 0) underruns++;
    end
    if (rst_n && byte_valid && byte_ready) taken++;
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL mode %0d: %s", mode, s); end
  endtask

  function automatic int ibits(input int m);
    int c = 192 * ((m < 2) ? 2 : (m < 4) ? 4 : 6);
    return (m == 0 || m == 2) ? c / 2 : (m == 4) ? c * 2 / 3 : c * 3 / 4;
  endfunction

  function automatic bit is_null(input int k);
    return k == 0 || (k >= 106 && k <= 149);
  endfunction

  task automatic frame(input int m, input int len);
    int nsym, bad, base;
    real yr, yi, mag, a;
    si.delete(); sq.delete(); underruns = 0; taken = 0;
    @(negedge clk);
    mode = 3'(m); frame_len = 16'(len); start = 1;
    @(negedge clk);
    start = 0;
    fork
      for (int k = 0; k < len; k++) begin
        byte_valid = 1; byte_data = 8'($urandom);
        @(posedge clk);
        while (!byte_ready) @(posedge clk);
        @(negedge clk);
        byte_valid = 0;
      end
    join_none
    @(negedge clk);
    while (busy) @(negedge clk);
    repeat (20) @(negedge clk);
    disable fork;
    byte_valid = 0;
    nsym = (16 + 8 * len + 6 + 40 + ibits(m) - 1) / ibits(m);
    chk(taken == len, $sformatf("bytes taken %0d of %0d", taken, len));
    chk(si.size() == 256 + (nsym + 1) * 266, $sformatf("samples %0d, want %0d", si.size(), 256 + (nsym + 1) * 266));
    chk(underruns == 0, $sformatf("%0d underruns", underruns));
    if (si.size() != 256 + (nsym + 1) * 266) return;
    bad = 0;
    for (int n = 0; n < 256; n++) begin
      if (!(si[n] == 256 || si[n] == -256) || !(sq[n] == 256 || sq[n] == -256)) bad++;
      if (n >= 64 && (si[n] != si[n-64] || sq[n] != sq[n-64])) bad++;
    end
    chk(bad == 0, "preamble");
    for (int s = 0; s <= nsym; s++) begin
      base = 256 + 266 * s;
      bad = 0;
      for (int n = 0; n < 10; n++) if (si[base+n] != si[base+256+n] || sq[base+n] != sq[base+256+n]) bad++;
      chk(bad == 0, $sformatf("cyclic prefix of symbol %0d", s));
      if (s < 3 || s == nsym) begin
        int badnull = 0, badpil = 0;
        for (int k = 0; k < 256; k++) begin
          yr = 0.0; yi = 0.0;
          for (int n = 0; n < 256; n++) begin
            a = -2.0 * PI * real'((k * n) % 256) / 256.0;
            yr += si[base+10+n] * $cos(a) - sq[base+10+n] * $sin(a);
            yi += si[base+10+n] * $sin(a) + sq[base+10+n] * $cos(a);
          end
          mag = $sqrt(yr * yr + yi * yi);
          if (is_null(k) && mag > 150.0) begin badnull++; $display("bin %0d mag %f", k, mag); end
          if (s == 0 && !is_null(k) && (mag < 3890.0 || mag > 4300.0)) badpil++;
        end
        chk(badnull == 0, $sformatf("symbol %0d: %0d null bins carry energy", s, badnull));
        if (s == 0) chk(badpil == 0, $sformatf("pilot symbol: %0d bins off 4096", badpil));
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame(0, 1);
    frame(0, 20);    // 182 bits fit one symbol, but the 40 padding bits force a second
    frame(1, 60);
    frame(2, 100);
    frame(3, 14);
    frame(4, 200);
    frame(5, 333);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
