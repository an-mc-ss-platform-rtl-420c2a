// Testbench for ofdm_deframer: three symbols of 256 bins, bin k carrying the
// value 1000*symbol + k, go in; out must come exactly the 192 data bins of
// each symbol (map rebuilt here: used indices 150..255 and 1..105, every
// 11th used bin from index 155 a pilot) in index order. Random stalls.
module tb_ofdm_deframer;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, out_ready = 0;
  logic in_ready, out_valid;
  logic signed [19:0] in_i = 0, in_q = 0, out_i, out_q;
  int checks = 0, failures = 0;
  int exp_q [$];
  int kind [256];

  ofdm_deframer #(.DW(20)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || int'(out_i) != exp_q[0] || int'(out_q) != -exp_q[0]) begin
        failures++; $display("FAIL got %0d", out_i);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    for (int k = 0; k < 256; k++) kind[k] = 0;
    for (int u = 0; u < 211; u++) kind[(u < 106) ? 150 + u : u - 105] = (u % 11 == 5) ? 1 : 2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++)
      for (int k = 0; k < 256; k++) begin
        if (kind[k] == 2) exp_q.push_back(1000 * s + k);
        in_valid = 1; in_first = (k == 0); in_i = 20'(1000 * s + k); in_q = -20'(1000 * s + k);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
      end
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d bins missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
