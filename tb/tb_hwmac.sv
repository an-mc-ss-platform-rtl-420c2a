// Testbench for hwmac, driven only through the register bus as software
// would: configure id, key and nonce, write a frame into the TX FIFO window,
// check the LEVELS register, start; the bytes leaving for the baseband after
// phy_tx_req must be header + payload + CRC-32 (plain frames) and
// phy_tx_len = 10+len+4. Those bytes are looped back to the receive input;
// the interrupt must rise, STATUS must report CRC and address ok and the
// length, and reading the RX FIFO window must return header and payload.
// Encrypted frames must come back decrypted; a frame for another id must
// not raise the interrupt.
module tb_hwmac;
  logic clk = 0, rst_n = 0;
  logic [7:0] bus_addr = 0;
  logic bus_we = 0, bus_re = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic irq, rx_enable, ptx_valid, ptx_ready = 0, phy_tx_req;
  logic [2:0] phy_mode;
  logic [6:0] sync_thr;
  logic [7:0] ptx_data;
  logic [15:0] phy_tx_len, prx_len = 0;
  logic prx_valid = 0, prx_ready, prx_first = 0;
  logic [7:0] prx_data = 0;
  int checks = 0, failures = 0;

  hwmac #(.FIFO_DEPTH(4096)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

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

  function automatic logic [31:0] crc(input logic [7:0] m [$]);
    logic [31:0] r = '1;
    foreach (m[i])
      for (int b = 0; b < 8; b++) r = (r[0] ^ m[i][b]) ? (r >> 1) ^ 32'hEDB88320 : r >> 1;
    return ~r;
  endfunction

  task automatic run(input logic [7:0] dest, input int len, input bit enc, input bit expect_rx);
    logic [7:0] fr [$], pk [$], sent [$];
    logic [31:0] d, f;
    int bad = 0;
    for (int i = 0; i < 10; i++) fr.push_back((i == 4) ? dest : 8'($urandom));
    for (int i = 0; i < len; i++) fr.push_back(8'($urandom));
    foreach (fr[i]) wr(8'h30, 32'(fr[i]));
    rd(8'h40, d);
    chk(d[15:0] == 16'(10 + len), "TX FIFO level");
    wr(8'h08, 32'(len));
    wr(8'h00, {25'd0, 3'd2, enc, 1'b1, enc, 1'b1});   // mode 2, rx on, start
    while (!phy_tx_req) @(negedge clk);
    chk(phy_tx_len == 16'(14 + len), "phy_tx_len");
    // drain the packet FIFO
    repeat (2) @(negedge clk);
    ptx_ready = 1;
    while (ptx_valid || pk.size() == 0) begin
      @(posedge clk);
      if (ptx_valid) pk.push_back(ptx_data);
      @(negedge clk);
    end
    ptx_ready = 0;
    chk(pk.size() == 14 + len, $sformatf("packet bytes %0d", pk.size()));
    if (pk.size() != 14 + len) return;
    for (int i = 0; i < len; i++) sent.push_back(pk[10+i]);
    f = crc(sent);
    for (int i = 0; i < 10; i++) if (pk[i] != fr[i]) bad++;
    if (!enc) for (int i = 0; i < len; i++) if (sent[i] != fr[10+i]) bad++;
    for (int b = 0; b < 4; b++) if (pk[10+len+b] != f[8*b +: 8]) bad++;
    chk(bad == 0, $sformatf("packet contents: %0d bad", bad));
    // loop back into the receiver
    foreach (pk[i]) begin
      prx_valid = 1; prx_data = pk[i]; prx_first = (i == 0); prx_len = 16'(pk.size());
      @(posedge clk);
      while (!prx_ready) @(posedge clk);
      @(negedge clk);
      prx_valid = 0; prx_first = 0;
    end
    repeat (100) @(negedge clk);
    chk(irq == expect_rx, "interrupt");
    if (!expect_rx) return;
    rd(8'h04, d);
    chk(d[3:1] == 3'b111 && d[31:16] == 16'(len), $sformatf("STATUS %h", d));
    bad = 0;
    for (int i = 0; i < 10 + len; i++) begin
      rd(8'h34, d);
      if (d[8] != 1'b1 || d[7:0] != fr[i]) bad++;
    end
    rd(8'h34, d);
    chk(bad == 0 && d[8] == 0, $sformatf("RX FIFO contents: %0d bad", bad));
    wr(8'h38, 1);
    chk(!irq, "interrupt cleared");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(8'h0C, 32'h42);
    wr(8'h10, 32'h2b7e1516); wr(8'h14, 32'h28aed2a6); wr(8'h18, 32'habf71588); wr(8'h1C, 32'h09cf4f3c);
    wr(8'h20, 32'hf0f1f2f3); wr(8'h24, 32'hf4f5f6f7); wr(8'h28, 32'hf8f9fafb); wr(8'h2C, 32'hfcfdfeff);
    run(8'h42, 37, 0, 1);
    run(8'h42, 100, 1, 1);
    run(8'hFF, 5, 1, 1);
    run(8'h07, 20, 0, 0);
    run(8'h42, 0, 0, 1);
    chk(phy_mode == 3'd2 && rx_enable && sync_thr == 7'd68, "configuration outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
