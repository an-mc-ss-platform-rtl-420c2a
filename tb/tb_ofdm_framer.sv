// Testbench for ofdm_framer. The subcarrier map is rebuilt here: used bins
// are FFT indices 150..255 and 1..105 (211 bins), every 11th used bin
// (starting at the 6th, index 155) is a pilot, the rest are the 192 data bins.
// Checks: the first symbol after clear is all known BPSK (+-4096 on the 211
// used bins, zero elsewhere); in the next three symbols the data bins carry
// the input chips in index order, pilots keep the sign they had in the
// pilot symbol, null bins are zero; 19 pilots and 192 data bins per symbol.
module tb_ofdm_framer;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_ready = 0;
  logic in_ready, out_valid, out_first, out_est;
  logic signed [15:0] in_i = 0, in_q = 0, out_i, out_q;
  int checks = 0, failures = 0;
  int kind [256];          // 0 null, 1 pilot, 2 data
  int psign [256];
  int chips_i [$], chips_q [$];
  int bin = 0, sym = 0, npil, ndat;

  ofdm_framer #(.DW(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL sym %0d bin %0d: %s (%0d,%0d)", sym, bin, s, out_i, out_q); end
  endtask

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    if (rst_n && !clear && out_valid && out_ready && sym < 4) begin
      if (bin == 0) chk(out_first, "first flag");
      chk(out_est == (sym == 0), "pilot-symbol flag");
      if (kind[bin] == 0) chk(out_i == 0 && out_q == 0, "null bin");
      else if (sym == 0) begin
        chk((out_i == 4096 || out_i == -4096) && out_q == 0, "pilot symbol value");
        psign[bin] = out_i;
      end else if (kind[bin] == 1) begin
        chk(out_i == psign[bin] && out_q == 0, "pilot value");
        npil++;
      end else begin
        chk(chips_i.size() > 0 && out_i == chips_i[0] && out_q == chips_q[0], "data chip");
        if (chips_i.size() > 0) begin void'(chips_i.pop_front()); void'(chips_q.pop_front()); end
        ndat++;
      end
      if (bin == 255) begin
        if (sym > 0) begin
          chk(npil == 19, $sformatf("19 pilots got %0d", npil));
          chk(ndat == 192, $sformatf("192 data got %0d", ndat));
        end
        npil = 0; ndat = 0;
        sym++;
        bin = 0;
      end else bin++;
    end
  end

  initial begin
    for (int k = 0; k < 256; k++) kind[k] = 0;
    for (int u = 0; u < 211; u++) kind[(u < 106) ? 150 + u : u - 105] = (u % 11 == 5) ? 1 : 2;
    npil = 0; ndat = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int c = 0; c < 3 * 192; c++) begin
      int vi, vq;
      vi = $signed($urandom_range(0, 20000)) - 10000;
      vq = $signed($urandom_range(0, 20000)) - 10000;
      chips_i.push_back(vi); chips_q.push_back(vq);
      in_valid = 1; in_i = 16'(vi); in_q = 16'(vq);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (300) @(negedge clk);
    chk(sym >= 4, "four symbols produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
