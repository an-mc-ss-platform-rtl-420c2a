// Testbench for hwmac_ctrl.
// Transmit: frames (10 header bytes + payload) are offered on the TX FIFO
// side with random gaps and random back-pressure on the packet side; the
// packet bytes must be the header, the payload (XORed with the AES-CTR
// keystream when encrypting) and the CRC-32 of the sent payload, least
// significant byte first, followed by phy_tx_req with length 10+len+4.
// The first keystream block is checked against the FIPS-197 example
// (key 000102..0f, counter block 00112233..ff -> 69c4e0d8...).
// Receive: frames are offered as a byte stream (first byte flagged, with the
// frame length); accepted frames (own id or 0xFF) must appear on the RX FIFO
// side as header + decrypted payload with one rx_event carrying CRC and
// address results; frames for other ids and frames while rx is disabled
// must vanish without an event; a corrupted frame gives crc_ok = 0. Frames
// produced by the transmit side are fed back to the receive side, also
// while another transmission runs, so the shared AES core is contended.
module tb_hwmac_ctrl;
  logic clk = 0, rst_n = 0;
  logic tx_start = 0, tx_encrypt = 0, rx_enable = 0, rx_decrypt = 0;
  logic [11:0] tx_len = 0;
  logic [7:0] dev_id = 8'h21;
  logic [127:0] aes_key = 128'h000102030405060708090a0b0c0d0e0f;
  logic [127:0] aes_nonce = 128'h00112233445566778899aabbccddeeff;
  logic txf_valid = 0, txf_ready;
  logic [7:0] txf_data = 0;
  logic pk_valid, pk_ready = 0, phy_tx_req;
  logic [7:0] pk_data;
  logic [15:0] phy_tx_len;
  logic prx_valid = 0, prx_ready, prx_first = 0;
  logic [7:0] prx_data = 0;
  logic [15:0] prx_len = 0;
  logic rxf_valid, rxf_ready = 0;
  logic [7:0] rxf_data;
  logic tx_busy, rx_event, rx_crc_ok, rx_addr_ok;
  logic [15:0] rx_len;
  int checks = 0, failures = 0;

  hwmac_ctrl dut (.*);
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

  function automatic logic [31:0] crc(input logic [7:0] m [$]);
    logic [31:0] r = '1;
    foreach (m[i])
      for (int b = 0; b < 8; b++) r = (r[0] ^ m[i][b]) ? (r >> 1) ^ 32'hEDB88320 : r >> 1;
    return ~r;
  endfunction

  // packet side and RX FIFO side collectors with random back-pressure
  logic [7:0] pk_q [$], rxf_q [$];
  int events = 0;
  logic last_crc_ok, last_addr_ok;
  int last_len;
  always @(negedge clk) begin
    pk_ready  = ($urandom_range(0, 3) != 0);
    rxf_ready = ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) begin
    if (rst_n && pk_valid && pk_ready) pk_q.push_back(pk_data);
    if (rst_n && rxf_valid && rxf_ready) rxf_q.push_back(rxf_data);
    if (rst_n && rx_event) begin
      events++; last_crc_ok = rx_crc_ok; last_addr_ok = rx_addr_ok; last_len = rx_len;
    end
  end

  // sends one frame through the transmit path; returns the packet bytes
  task automatic tx_frame(input logic [7:0] hdr [10], input logic [7:0] pay [$], input bit enc,
                          output logic [7:0] pk [$]);
    int len = pay.size();
    pk_q.delete();
    @(negedge clk);
    tx_len = 12'(len); tx_encrypt = enc; tx_start = 1;
    @(negedge clk);
    tx_start = 0;
    for (int i = 0; i < 10 + len; i++) begin
      while ($urandom_range(0, 4) == 0) @(negedge clk);
      txf_valid = 1; txf_data = (i < 10) ? hdr[i] : pay[i-10];
      @(posedge clk);
      while (!txf_ready) @(posedge clk);
      @(negedge clk);
      txf_valid = 0;
    end
    while (!phy_tx_req) @(negedge clk);
    chk(phy_tx_len == 16'(14 + len), "phy_tx_len");
    @(negedge clk);
    pk = pk_q;
  endtask

  task automatic rx_frame(input logic [7:0] f [$]);
    foreach (f[i]) begin
      while ($urandom_range(0, 4) == 0) @(negedge clk);
      prx_valid = 1; prx_data = f[i]; prx_first = (i == 0); prx_len = 16'(f.size());
      @(posedge clk);
      while (!prx_ready) @(posedge clk);
      @(negedge clk);
      prx_valid = 0; prx_first = 0;
    end
    repeat (40) @(negedge clk);
  endtask

  function automatic void mk_frame(input logic [7:0] dest, input int len,
                                   output logic [7:0] hdr [10], output logic [7:0] pay [$]);
    for (int i = 0; i < 10; i++) hdr[i] = 8'($urandom);
    hdr[4] = dest;
    pay.delete();
    for (int i = 0; i < len; i++) pay.push_back(8'($urandom));
  endfunction

  // checks the packet bytes of a transmitted frame; returns the sent payload
  task automatic check_tx(input logic [7:0] hdr [10], input logic [7:0] pay [$], input bit enc,
                          input logic [7:0] pk [$], output logic [7:0] sent [$]);
    logic [31:0] f;
    int len = pay.size(), bad = 0;
    chk(pk.size() == 14 + len, $sformatf("packet size %0d for len %0d", pk.size(), len));
    if (pk.size() != 14 + len) return;
    for (int i = 0; i < 10; i++) if (pk[i] != hdr[i]) bad++;
    sent.delete();
    for (int i = 0; i < len; i++) sent.push_back(pk[10+i]);
    if (!enc) foreach (sent[i]) if (sent[i] != pay[i]) bad++;
    f = crc(sent);
    for (int b = 0; b < 4; b++) if (pk[10+len+b] != f[8*b +: 8]) bad++;
    chk(bad == 0, $sformatf("packet contents (len %0d enc %0d): %0d bad bytes", len, enc, bad));
  endtask

  task automatic check_rx(input logic [7:0] hdr [10], input logic [7:0] pay [$], input int ev0,
                          input bit crc_ok);
    int bad = 0;
    chk(events == ev0 + 1 && last_addr_ok && last_crc_ok == crc_ok && last_len == pay.size(),
        $sformatf("rx event (events %0d crc %0d addr %0d len %0d)", events - ev0, last_crc_ok, last_addr_ok, last_len));
    chk(rxf_q.size() == 10 + pay.size(), $sformatf("rx bytes %0d", rxf_q.size()));
    if (rxf_q.size() != 10 + pay.size()) return;
    for (int i = 0; i < 10; i++) if (rxf_q[i] != hdr[i]) bad++;
    foreach (pay[i]) if (rxf_q[10+i] != pay[i]) bad++;
    chk(bad == 0 || !crc_ok, $sformatf("rx contents: %0d bad bytes", bad));
  endtask

  initial begin
    logic [7:0] hdr [10], pay [$], pk [$], sent [$], fr [$];
    logic [127:0] ks0 = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    int ev0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // keystream block 0 against FIPS-197: all-zero payload, encrypted
    mk_frame(8'h21, 40, hdr, pay);
    foreach (pay[i]) pay[i] = 8'h00;
    tx_frame(hdr, pay, 1, pk);
    check_tx(hdr, pay, 1, pk, sent);
    for (int i = 0; i < 16; i++) chk(sent[i] == ks0[127 - 8*i -: 8], "AES-CTR block 0 keystream");
    chk(sent[16:31] != sent[0:15], "block 1 uses the next counter");
    // plain and encrypted frames of several lengths, fed back to the receiver
    rx_enable = 1;
    for (int t = 0; t < 8; t++) begin
      int len = (t == 0) ? 0 : (t == 1) ? 1 : (t == 2) ? 16 : (t == 3) ? 17 : $urandom_range(2, 300);
      bit enc = t[0];
      mk_frame((t == 5) ? 8'hFF : 8'h21, len, hdr, pay);
      tx_frame(hdr, pay, enc, pk);
      check_tx(hdr, pay, enc, pk, sent);
      rx_decrypt = enc;
      rxf_q.delete(); ev0 = events;
      fr = pk;
      rx_frame(fr);
      check_rx(hdr, pay, ev0, 1);
    end
    // foreign destination: dropped without event, then a good frame
    mk_frame(8'h55, 50, hdr, pay);
    tx_frame(hdr, pay, 0, pk);
    rxf_q.delete(); ev0 = events;
    rx_frame(pk);
    chk(events == ev0 && rxf_q.size() == 0, "foreign frame dropped");
    mk_frame(8'h21, 30, hdr, pay);
    tx_frame(hdr, pay, 0, pk);
    rx_decrypt = 0;
    rx_frame(pk);
    check_rx(hdr, pay, ev0, 1);
    // corrupted payload: crc_ok = 0
    mk_frame(8'h21, 60, hdr, pay);
    tx_frame(hdr, pay, 0, pk);
    pk[20] ^= 8'h10;
    rxf_q.delete(); ev0 = events;
    rx_frame(pk);
    check_rx(hdr, pay, ev0, 0);
    // receiver disabled: frame discarded
    rx_enable = 0;
    rxf_q.delete(); ev0 = events;
    rx_frame(pk);
    chk(events == ev0 && rxf_q.size() == 0, "rx disabled");
    rx_enable = 1;
    // encrypted receive while an encrypted transmission runs
    mk_frame(8'h21, 200, hdr, pay);
    tx_frame(hdr, pay, 1, pk);
    fr = pk;
    rx_decrypt = 1;
    rxf_q.delete(); ev0 = events;
    mk_frame(8'h21, 150, hdr, pay);
    fork
      rx_frame(fr);
      tx_frame(hdr, pay, 1, pk);
    join
    check_tx(hdr, pay, 1, pk, sent);
    chk(events == ev0 + 1 && last_crc_ok && rxf_q.size() == 210, "rx during tx");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
