// MAC hardware: the part of the IEEE 802.15.3-style MAC that sits between the
// software MAC and the baseband. The software sees only a register space
// (hwmac_regs): it writes a frame into the TX FIFO, sets the configuration
// and starts transmission; the global controller (hwmac_ctrl) formats the
// frame (optional AES-CTR, CRC-32) into the packet-formatted TX FIFO and asks
// the baseband to send it. Received frames are parsed, address-verified,
// CRC-checked and optionally decrypted into the RX FIFO, and an interrupt
// tells the software. All FIFOs hold FIFO_DEPTH bytes.
module hwmac #(
  parameter int FIFO_DEPTH = 4096
) (
  input  logic         clk,
  input  logic         rst_n,
  // software MAC bus
  input  logic [7:0]   bus_addr,
  input  logic         bus_we,
  input  logic         bus_re,
  input  logic [31:0]  bus_wdata,
  output logic [31:0]  bus_rdata,
  output logic         irq,
  // configuration for the baseband
  output logic [2:0]   phy_mode,
  output logic [6:0]   sync_thr,
  output logic         rx_enable,
  // to the baseband transmitter
  output logic         ptx_valid,
  input  logic         ptx_ready,
  output logic [7:0]   ptx_data,
  output logic         phy_tx_req,
  output logic [15:0]  phy_tx_len,
  // from the baseband receiver
  input  logic         prx_valid,
  output logic         prx_ready,
  input  logic [7:0]   prx_data,
  input  logic         prx_first,
  input  logic [15:0]  prx_len
);
  localparam int LW = $clog2(FIFO_DEPTH) + 1;

  logic         tx_start, tx_encrypt, rx_decrypt;
  logic [11:0]  tx_len;
  logic [7:0]   dev_id;
  logic [127:0] aes_key, aes_nonce;
  logic         txf_push, rxf_pop;
  logic [7:0]   txf_wdata;
  logic         tx_busy, rx_event, rx_crc_ok, rx_addr_ok;
  logic [15:0]  rx_len;
  logic [LW-1:0] txf_cnt, rxf_cnt, pkf_cnt;

  logic        txf_valid, txf_ready;  logic [7:0] txf_data;
  logic        pk_valid, pk_ready;    logic [7:0] pk_data;
  logic        rxw_valid, rxw_ready;  logic [7:0] rxw_data;
  logic        rxf_valid;             logic [7:0] rxf_data;
  logic        txf_in_ready;   // a push into a full TX FIFO is dropped

  hwmac_regs u_regs (
    .clk, .rst_n, .bus_addr, .bus_we, .bus_re, .bus_wdata, .bus_rdata,
    .tx_start, .tx_encrypt, .rx_enable, .rx_decrypt, .phy_mode, .tx_len, .dev_id,
    .aes_key, .aes_nonce, .sync_thr,
    .txf_push, .txf_data(txf_wdata), .rxf_pop, .rxf_valid, .rxf_data,
    .txf_level(16'(txf_cnt)), .rxf_level(16'(rxf_cnt)),
    .tx_busy, .rx_event, .rx_crc_ok, .rx_addr_ok, .rx_len, .irq);

  sync_fifo #(.W(8), .DEPTH(FIFO_DEPTH)) u_txf (
    .clk, .rst_n, .clear(1'b0), .in_valid(txf_push), .in_ready(txf_in_ready), .in_data(txf_wdata),
    .out_valid(txf_valid), .out_ready(txf_ready), .out_data(txf_data), .count(txf_cnt));

  sync_fifo #(.W(8), .DEPTH(FIFO_DEPTH)) u_pkf (
    .clk, .rst_n, .clear(1'b0), .in_valid(pk_valid), .in_ready(pk_ready), .in_data(pk_data),
    .out_valid(ptx_valid), .out_ready(ptx_ready), .out_data(ptx_data), .count(pkf_cnt));

  sync_fifo #(.W(8), .DEPTH(FIFO_DEPTH)) u_rxf (
    .clk, .rst_n, .clear(1'b0), .in_valid(rxw_valid), .in_ready(rxw_ready), .in_data(rxw_data),
    .out_valid(rxf_valid), .out_ready(rxf_pop), .out_data(rxf_data), .count(rxf_cnt));

  hwmac_ctrl u_ctrl (
    .clk, .rst_n, .tx_start, .tx_encrypt, .tx_len, .rx_enable, .rx_decrypt, .dev_id,
    .aes_key, .aes_nonce,
    .txf_valid, .txf_ready, .txf_data,
    .pk_valid, .pk_ready, .pk_data, .phy_tx_req, .phy_tx_len,
    .prx_valid, .prx_ready, .prx_data, .prx_first, .prx_len,
    .rxf_valid(rxw_valid), .rxf_ready(rxw_ready), .rxf_data(rxw_data),
    .tx_busy, .rx_event, .rx_crc_ok, .rx_addr_ok, .rx_len);

endmodule
