// Testbench for conv_encoder: the impulse response must spell the generator
// polynomials 133 and 171 (octal), and 500 random bits are compared with a
// reference built from the bit history. Back-pressure is applied at random.
module tb_conv_encoder;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_bit = 0, out_ready = 0;
  logic in_ready, out_valid;
  logic [1:0] out_pair;
  int checks = 0, failures = 0;
  logic hist [$];

  conv_encoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] ref_pair();
    logic a = 0, b = 0;
    int n = hist.size();
    for (int k = 0; k < 7; k++) begin
      logic u = (n - 1 - k >= 0) ? hist[n-1-k] : 1'b0;
      a ^= u & 7'o133 >> (6 - k);
      b ^= u & 7'o171 >> (6 - k);
    end
    return {a, b};
  endfunction

  task automatic push(input logic b);
    @(negedge clk);
    in_valid = 1; in_bit = b;
    out_ready = ($urandom_range(0, 3) != 0);
    while (!out_ready) begin @(negedge clk); out_ready = ($urandom_range(0, 3) != 0); end
    hist.push_back(b);
    #1;
    checks++;
    if (!out_valid || out_pair !== ref_pair()) begin
      failures++;
      $display("FAIL bit %0d pair %b expected %b", hist.size(), out_pair, ref_pair());
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    logic [6:0] ga = 0, gb = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // impulse response
    @(negedge clk);
    out_ready = 1;
    for (int t = 0; t < 7; t++) begin
      in_valid = 1; in_bit = (t == 0);
      #1;
      ga[6-t] = out_pair[1];
      gb[6-t] = out_pair[0];
      @(negedge clk);
    end
    in_valid = 0;
    checks++;
    if (ga !== 7'o133 || gb !== 7'o171) begin failures++; $display("FAIL impulse %o %o", ga, gb); end
    clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < 500; i++) push($urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
