// Testbench for hwmac_regs: reset values (SYNC_THR = 68, rest 0), write and
// read-back of every read/write register with random data and the matching
// output ports, the tx_start write-one pulse, TX FIFO pushes, RX FIFO pops
// (only when a byte is there), the STATUS and LEVELS read-only views, the
// interrupt (set by rx_event, cleared only by writing 1 to IRQ[0]) and
// zero read data for unmapped addresses.
module tb_hwmac_regs;
  logic clk = 0, rst_n = 0;
  logic [7:0] bus_addr = 0;
  logic bus_we = 0, bus_re = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic tx_start, tx_encrypt, rx_enable, rx_decrypt;
  logic [2:0] phy_mode;
  logic [11:0] tx_len;
  logic [7:0] dev_id, txf_data;
  logic [127:0] aes_key, aes_nonce;
  logic [6:0] sync_thr;
  logic txf_push, rxf_pop, rxf_valid = 0;
  logic [7:0] rxf_data = 0;
  logic [15:0] txf_level = 0, rxf_level = 0, rx_len = 0;
  logic tx_busy = 0, rx_event = 0, rx_crc_ok = 0, rx_addr_ok = 0, irq;
  int checks = 0, failures = 0;
  int pushes = 0, pops = 0, starts = 0;

  hwmac_regs dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && txf_push) begin
      pushes++;
      checks++;
      if (txf_data != bus_wdata[7:0]) begin failures++; $display("FAIL push data"); end
    end
    if (rst_n && rxf_pop) pops++;
    if (rst_n && tx_start) starts++;
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

  initial begin
    logic [31:0] d, v [12];
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(8'h3C, d); chk(d == 68 && sync_thr == 68, "SYNC_THR reset 68");
    rd(8'h00, d); chk(d == 0 && !tx_encrypt && !rx_enable, "CTRL reset 0");
    rd(8'h38, d); chk(d == 0 && !irq, "IRQ reset 0");
    // key, nonce
    for (int k = 0; k < 8; k++) begin v[k] = $urandom; wr(8'h10 + 8'(4 * k), v[k]); end
    chk(aes_key == {v[0], v[1], v[2], v[3]}, "aes_key port");
    chk(aes_nonce == {v[4], v[5], v[6], v[7]}, "aes_nonce port");
    for (int k = 0; k < 8; k++) begin rd(8'h10 + 8'(4 * k), d); chk(d == v[k], "key/nonce readback"); end
    // other registers
    wr(8'h08, 32'hFFFF_F5A3); rd(8'h08, d); chk(d == 32'h5A3 && tx_len == 12'h5A3, "TX_LEN");
    wr(8'h0C, 32'h0000_01C7); rd(8'h0C, d); chk(d == 32'hC7 && dev_id == 8'hC7, "DEV_ID");
    wr(8'h3C, 32'd50);        rd(8'h3C, d); chk(d == 50 && sync_thr == 50, "SYNC_THR");
    // CTRL: mode 5, rx enabled, rx decrypt, tx encrypt; start bit is a pulse
    wr(8'h00, 32'h0000_005E);
    rd(8'h00, d);
    chk(d == 32'h5E && phy_mode == 3'd5 && rx_enable && rx_decrypt && tx_encrypt, "CTRL fields");
    chk(starts == 0, $sformatf("no start without bit 0 (%0d)", starts));
    wr(8'h00, 32'h0000_005F);
    @(negedge clk);
    chk(starts == 1, "one start pulse");
    rd(8'h00, d); chk(d[0] == 0 && d[6:4] == 3'd5, "start bit self-clears");
    // TX FIFO pushes
    for (int k = 0; k < 5; k++) wr(8'h30, 32'(k + 8'hA0));
    chk(pushes == 5, "five pushes");
    // RX FIFO read pops only valid bytes
    rxf_valid = 0; rd(8'h34, d); chk(d[8] == 0 && pops == 0, "empty RX read");
    rxf_valid = 1; rxf_data = 8'h3C; rd(8'h34, d); chk(d == 32'h13C && pops == 1, "RX read pops");
    rxf_valid = 0;
    // status and levels
    tx_busy = 1; txf_level = 16'd1234; rxf_level = 16'd77;
    rd(8'h04, d); chk(d == 32'h1, "STATUS tx_busy");
    rd(8'h40, d); chk(d == {16'd77, 16'd1234}, "LEVELS");
    tx_busy = 0;
    // receive event: status latched, interrupt raised
    @(negedge clk);
    rx_event = 1; rx_crc_ok = 1; rx_addr_ok = 0; rx_len = 16'd300;
    @(negedge clk);
    rx_event = 0; rx_crc_ok = 0; rx_len = 0;
    chk(irq, "irq raised");
    rd(8'h04, d); chk(d == {16'd300, 12'd0, 3'b011, 1'b0}, "STATUS after rx");
    wr(8'h38, 32'h0); chk(irq, "writing 0 keeps irq");
    wr(8'h38, 32'h1); chk(!irq, "w1c clears irq");
    rd(8'h38, d); chk(d == 0, "IRQ reads 0");
    rd(8'h7C, d); chk(d == 0, "unmapped reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
