// Testbench for tx_multiplex. After clear: 256 preamble samples, each I and
// Q equal to +-256, repeating with period 64, flagged by out_pre. Then for
// each of four random 256-sample symbols: its last 10 samples followed by
// all 256 (266 samples), sym_start on the first. With the input supplied
// as fast as it is accepted and the output always ready, the output must
// not have gaps after the first symbol has been loaded.
module tb_tx_multiplex;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_ready = 1;
  logic in_ready, out_valid, out_pre, out_sym_start;
  logic signed [15:0] in_i = 0, in_q = 0, out_i, out_q;
  int checks = 0, failures = 0;
  int si [4][256], sq [4][256];
  int pre_i [256], pre_q [256];
  int n = 0, gaps = 0;
  bit started = 0;

  tx_multiplex #(.DW(16)) dut (.*);
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
    if (!c) begin failures++; $display("FAIL sample %0d: %s (%0d,%0d)", n, s, out_i, out_q); end
  endtask

  always @(posedge clk) begin
    if (rst_n && !clear && n < 256 + 4 * 266) begin
      if (out_valid && out_ready) begin
        if (n < 256) begin
          chk(out_pre, "preamble flag");
          chk((out_i == 256 || out_i == -256) && (out_q == 256 || out_q == -256), "preamble level");
          pre_i[n] = out_i; pre_q[n] = out_q;
          if (n >= 64) chk(out_i == pre_i[n-64] && out_q == pre_q[n-64], "preamble period 64");
        end else begin
          automatic int s = (n - 256) / 266, p = (n - 256) % 266;
          automatic int k = (p < 10) ? 246 + p : p - 10;
          chk(!out_pre, "no preamble flag");
          chk(out_sym_start == (p == 0), "symbol start flag");
          chk(out_i == si[s][k] && out_q == sq[s][k], "prefix/symbol sample");
          started = 1;
        end
        n++;
      end else if (started) gaps++;
    end
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int k = 0; k < 256; k++) begin
        si[s][k] = $signed($urandom_range(0, 4000)) - 2000;
        sq[s][k] = $signed($urandom_range(0, 4000)) - 2000;
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int s = 0; s < 4; s++)
      for (int k = 0; k < 256; k++) begin
        in_valid = 1; in_i = 16'(si[s][k]); in_q = 16'(sq[s][k]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
      end
    repeat (600) @(negedge clk);
    chk(n == 256 + 4 * 266, $sformatf("sample count %0d", n));
    checks++;
    if (gaps != 0) begin failures++; $display("FAIL %0d output gaps", gaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
