// Testbench for sync_fifo: a 16-deep and a 4096-deep instance get random
// pushes and pops (including runs that fill them completely and drain them)
// compared with a queue model; data order, count, full (in_ready low
// exactly at DEPTH words), empty (out_valid low) and clear are checked.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        c16 = 0, v16 = 0, r16 = 0, ir16, ov16;
  logic [7:0]  d16 = 0, o16;
  logic [4:0]  n16;
  logic        c4k = 0, v4k = 0, r4k = 0, ir4k, ov4k;
  logic [7:0]  d4k = 0, o4k;
  logic [12:0] n4k;
  sync_fifo #(.W(8), .DEPTH(16)) u16 (.clk, .rst_n, .clear(c16), .in_valid(v16), .in_ready(ir16),
    .in_data(d16), .out_valid(ov16), .out_ready(r16), .out_data(o16), .count(n16));
  sync_fifo #(.W(8), .DEPTH(4096)) u4k (.clk, .rst_n, .clear(c4k), .in_valid(v4k), .in_ready(ir4k),
    .in_data(d4k), .out_valid(ov4k), .out_ready(r4k), .out_data(o4k), .count(n4k));

  logic [7:0] m16 [$], m4k [$];

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  // one cycle on both FIFOs; pin / pout are push and pop probabilities in %
  task automatic step(input int pin, input int pout);
    @(negedge clk);
    v16 = ($urandom_range(0, 99) < pin); d16 = 8'($urandom);
    r16 = ($urandom_range(0, 99) < pout);
    v4k = ($urandom_range(0, 99) < pin); d4k = 8'($urandom);
    r4k = ($urandom_range(0, 99) < pout);
    #1;
    chk(int'(n16) == m16.size() && ir16 == (m16.size() < 16) && ov16 == (m16.size() > 0), "16: count/flags");
    chk(int'(n4k) == m4k.size() && ir4k == (m4k.size() < 4096) && ov4k == (m4k.size() > 0), "4096: count/flags");
    if (ov16 && r16) begin chk(o16 == m16[0], "16: data"); void'(m16.pop_front()); end
    if (ov4k && r4k) begin chk(o4k == m4k[0], "4096: data"); void'(m4k.pop_front()); end
    if (v16 && ir16) m16.push_back(d16);
    if (v4k && ir4k) m4k.push_back(d4k);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) step(50, 50);
    for (int k = 0; k < 5000; k++) step(90, 5);     // fill up
    chk(m16.size() == 16 && m4k.size() > 4000, "fill phase");
    for (int k = 0; k < 6000; k++) step(5, 95);     // drain
    for (int k = 0; k < 3000; k++) step(70, 60);
    @(negedge clk);
    v16 = 0; v4k = 0; r16 = 0; r4k = 0;
    c16 = 1; c4k = 1;
    @(negedge clk);
    c16 = 0; c4k = 0;
    m16.delete(); m4k.delete();
    #1;
    chk(n16 == 0 && !ov16 && n4k == 0 && !ov4k, "clear empties");
    for (int k = 0; k < 2000; k++) step(60, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
