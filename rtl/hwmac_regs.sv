// Configuration/status register file and address decoder of the MAC
// hardware. The software MAC sees the MAC hardware as memory: a 32-bit bus
// with byte addresses, one access per cycle, read data combinational.
//   0x00 CTRL     [0] tx_start (write-one pulse, issued the cycle after the write), [1] tx_encrypt,
//                 [2] rx_enable, [3] rx_decrypt, [6:4] PHY mode
//   0x04 STATUS   RO [0] tx_busy, [1] rx frame received, [2] rx CRC ok,
//                 [3] rx address ok, [31:16] last rx payload length
//   0x08 TX_LEN   [11:0] payload bytes of the frame to send
//   0x0C DEV_ID   [7:0] own device id (address verification)
//   0x10..0x1C    AES key, 0x10 holds key[127:96]
//   0x20..0x2C    AES-CTR nonce / initial counter block, 0x20 holds [127:96]
//   0x30 TX_FIFO  WO [7:0] push one byte into the transmit FIFO
//   0x34 RX_FIFO  RO [7:0] byte, [8] byte was valid; the read pops it
//   0x38 IRQ      R [0] pending; write 1 to [0] to clear
//   0x3C SYNC_THR [6:0] autocorrelation threshold in percent (reset 68)
//   0x40 LEVELS   RO [15:0] TX FIFO level, [31:16] RX FIFO level
// The existence of mapped configuration/status registers and FIFO windows
// and of the interrupt is the modem's design; the map itself is this
// design's. The interrupt is raised by rx_event and stays until cleared.
module hwmac_regs (
  input  logic         clk,
  input  logic         rst_n,
  // bus
  input  logic [7:0]   bus_addr,
  input  logic         bus_we,
  input  logic         bus_re,
  input  logic [31:0]  bus_wdata,
  output logic [31:0]  bus_rdata,
  // configuration
  output logic         tx_start,
  output logic         tx_encrypt,
  output logic         rx_enable,
  output logic         rx_decrypt,
  output logic [2:0]   phy_mode,
  output logic [11:0]  tx_len,
  output logic [7:0]   dev_id,
  output logic [127:0] aes_key,
  output logic [127:0] aes_nonce,
  output logic [6:0]   sync_thr,
  // FIFO windows
  output logic         txf_push,
  output logic [7:0]   txf_data,
  output logic         rxf_pop,
  input  logic         rxf_valid,
  input  logic [7:0]   rxf_data,
  input  logic [15:0]  txf_level,
  input  logic [15:0]  rxf_level,
  // status
  input  logic         tx_busy,
  input  logic         rx_event,
  input  logic         rx_crc_ok,
  input  logic         rx_addr_ok,
  input  logic [15:0]  rx_len,
  output logic         irq
);
  logic [31:0] ctrl_q;
  logic [2:0]  stat_q;
  logic [15:0] rxlen_q;

  assign tx_encrypt = ctrl_q[1];
  assign rx_enable  = ctrl_q[2];
  assign rx_decrypt = ctrl_q[3];
  assign phy_mode   = ctrl_q[6:4];
  assign txf_push   = bus_we && bus_addr == 8'h30;
  assign txf_data   = bus_wdata[7:0];
  assign rxf_pop    = bus_re && bus_addr == 8'h34 && rxf_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl_q    <= '0;
      tx_len    <= '0;
      dev_id    <= '0;
      aes_key   <= '0;
      aes_nonce <= '0;
      sync_thr  <= 7'd68;
      stat_q    <= '0;
      rxlen_q   <= '0;
      irq       <= 1'b0;
      tx_start  <= 1'b0;
    end else begin
      // registered so that the controller sees the CTRL fields written together with the start bit
      tx_start <= bus_we && bus_addr == 8'h00 && bus_wdata[0];
      if (bus_we) begin
        case (bus_addr)
          8'h00: ctrl_q <= {bus_wdata[31:1], 1'b0};
          8'h08: tx_len <= bus_wdata[11:0];
          8'h0C: dev_id <= bus_wdata[7:0];
          8'h10: aes_key[127:96]  <= bus_wdata;
          8'h14: aes_key[95:64]   <= bus_wdata;
          8'h18: aes_key[63:32]   <= bus_wdata;
          8'h1C: aes_key[31:0]    <= bus_wdata;
          8'h20: aes_nonce[127:96] <= bus_wdata;
          8'h24: aes_nonce[95:64]  <= bus_wdata;
          8'h28: aes_nonce[63:32]  <= bus_wdata;
          8'h2C: aes_nonce[31:0]   <= bus_wdata;
          8'h38: if (bus_wdata[0]) irq <= 1'b0;
          8'h3C: sync_thr <= bus_wdata[6:0];
          default: ;
        endcase
      end
      if (rx_event) begin
        irq     <= 1'b1;
        stat_q  <= {rx_addr_ok, rx_crc_ok, 1'b1};
        rxlen_q <= rx_len;
      end
    end
  end

  always_comb begin
    case (bus_addr)
      8'h00: bus_rdata = ctrl_q;
      8'h04: bus_rdata = {rxlen_q, 12'd0, stat_q, tx_busy};
      8'h08: bus_rdata = {20'd0, tx_len};
      8'h0C: bus_rdata = {24'd0, dev_id};
      8'h10: bus_rdata = aes_key[127:96];
      8'h14: bus_rdata = aes_key[95:64];
      8'h18: bus_rdata = aes_key[63:32];
      8'h1C: bus_rdata = aes_key[31:0];
      8'h20: bus_rdata = aes_nonce[127:96];
      8'h24: bus_rdata = aes_nonce[95:64];
      8'h28: bus_rdata = aes_nonce[63:32];
      8'h2C: bus_rdata = aes_nonce[31:0];
      8'h34: bus_rdata = {23'd0, rxf_valid, rxf_data};
      8'h38: bus_rdata = {31'd0, irq};
      8'h3C: bus_rdata = {25'd0, sync_thr};
      8'h40: bus_rdata = {rxf_level, txf_level};
      default: bus_rdata = '0;
    endcase
  end
endmodule
