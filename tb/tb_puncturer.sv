// Testbench for puncturer: random coded pairs for rates 1/2, 2/3 and 3/4
// with random stalls on both sides; the output bit stream is compared with
// the expected kept bits (1/2: a b; 2/3: a1 b1 a2; 3/4: a1 b1 a2 b3) and the
// number of output bits with the rate (e.g. 120 pairs at 3/4 give 160 bits).
module tb_puncturer;
  import mhdr_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_ready = 0;
  rate_e rate = R_12;
  logic in_ready, out_valid, out_bit;
  logic [1:0] in_pair = 0;
  int checks = 0, failures = 0;
  logic exp_q [$];
  int got;

  puncturer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      got++;
      checks++;
      if (exp_q.size() == 0 || out_bit !== exp_q[0]) begin
        failures++;
        $display("FAIL rate %0d bit %0d", rate, got);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  task automatic run(input rate_e r, input int npairs, input int nexp);
    logic [1:0] p;
    @(negedge clk);
    rate = r; clear = 1;
    @(negedge clk);
    clear = 0; got = 0;
    for (int i = 0; i < npairs; i++) begin
      p = 2'($urandom);
      case (r)
        R_12: begin exp_q.push_back(p[1]); exp_q.push_back(p[0]); end
        R_23: begin exp_q.push_back(p[1]); if (i % 2 == 0) exp_q.push_back(p[0]); end
        default: begin
          if (i % 3 != 2) exp_q.push_back(p[1]);
          if (i % 3 != 1) exp_q.push_back(p[0]);
        end
      endcase
      in_valid = 1; in_pair = p;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (10) @(negedge clk);
    checks++;
    if (got != nexp || exp_q.size() != 0) begin
      failures++;
      $display("FAIL rate %0d produced %0d bits, expected %0d", r, got, nexp);
    end
    exp_q = {};
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(R_12, 120, 240);
    run(R_23, 120, 180);
    run(R_34, 120, 160);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
