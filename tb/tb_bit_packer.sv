// Testbench for bit_packer: random bit streams for 2, 4 and 6 bits per
// word; every word must hold the next nbits bits, first bit in the most
// significant used position, under random output stalls.
module tb_bit_packer;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_bit = 0, out_ready = 0;
  logic [2:0] nbits = 2;
  logic in_ready, out_valid;
  logic [5:0] out_word;
  int checks = 0, failures = 0;
  logic [5:0] exp_q [$];

  bit_packer #(.MAXW(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_word !== exp_q[0]) begin
        failures++;
        $display("FAIL nbits %0d word %b", nbits, out_word);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  task automatic run(input int nb, input int nwords);
    logic [5:0] w;
    @(negedge clk);
    nbits = 3'(nb);
    for (int i = 0; i < nwords; i++) begin
      w = 6'($urandom) & 6'((1 << nb) - 1);
      exp_q.push_back(w);
      for (int b = nb - 1; b >= 0; b--) begin
        in_valid = 1; in_bit = w[b];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
      end
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words missing", exp_q.size()); end
    exp_q = {};
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(2, 100);
    run(4, 100);
    run(6, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
