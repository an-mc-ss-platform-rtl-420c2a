// Self-checking testbench for aes128_core: FIPS-197 appendix C.1 and the
// SP 800-38A ECB-AES128 vectors, plus the 10-cycle latency of one block.
module tb_aes128_core;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [127:0] key, pt, ct;
  int checks = 0, failures = 0;

  aes128_core dut (.clk, .rst_n, .start, .key, .block_in(pt), .busy, .done, .block_out(ct));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp);
    int cyc;
    @(negedge clk);
    key = k; pt = p; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (ct !== exp) begin failures++; $display("FAIL ct=%h exp=%h", ct, exp); end
    checks++;
    if (cyc != 11) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    key = '0; pt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h6bc1bee22e409f96e93d7e117393172a,
        128'h3ad77bb40d7a3660a89ecaf32466ef97);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
        128'hf5d3d58503b9699de785895a96fdbaaf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
