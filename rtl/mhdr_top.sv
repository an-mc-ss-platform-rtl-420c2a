// Digital part of the MC-SS wireless NIC: MAC hardware plus the MC-SS
// baseband transmitter and receiver, as one would place them in the FPGA.
// The software MAC (on an external processor) reaches the design only
// through the 32-bit register bus and the interrupt; the RF transceiver is
// reached through 12-bit I/Q converter ports (dac_* out, adc_* in). A frame
// written by software is formatted by the MAC hardware and, when it asks,
// sent by the transmitter; the receiver is enabled by the rx_enable bit and
// its decoded frames flow back into the MAC hardware. The PHY mode and the
// synchronisation threshold come from MAC registers. One clock drives the
// whole design; the ADC sample strobe must come at most every sixth cycle.
// Status outputs expose the receiver's synchronisation events for test and
// for an RF control block (not included).
module mhdr_top
  import mhdr_pkg::*;
#(
  parameter int FIFO_DEPTH = 4096,
  parameter int PAD_MIN    = 40
) (
  input  logic               clk,
  input  logic               rst_n,
  // software MAC bus
  input  logic [7:0]         bus_addr,
  input  logic               bus_we,
  input  logic               bus_re,
  input  logic [31:0]        bus_wdata,
  output logic [31:0]        bus_rdata,
  output logic               irq,
  // DAC side
  output logic               dac_valid,
  input  logic               dac_ready,
  output logic signed [11:0] dac_i,
  output logic signed [11:0] dac_q,
  output logic               tx_active,
  // ADC side
  input  logic               adc_valid,
  input  logic signed [11:0] adc_i,
  input  logic signed [11:0] adc_q,
  // receiver status
  output logic               rx_synced,
  output logic               rx_flat,
  output logic               rx_peak,
  output logic               rx_est_done,
  output logic               rx_overflow,
  output logic signed [23:0] rx_cfo_step       // frequency offset estimate, phase step per sample (2^24 = one cycle)
);
  logic [2:0]  phy_mode;
  logic [6:0]  sync_thr;
  logic        rx_enable;
  logic        ptx_valid, ptx_ready, phy_tx_req;
  logic [7:0]  ptx_data;
  logic [15:0] phy_tx_len;
  logic        prx_valid, prx_ready, prx_first;
  logic [7:0]  prx_data;
  logic [15:0] prx_len;
  logic        dac_pre;

  hwmac #(.FIFO_DEPTH(FIFO_DEPTH)) u_mac (
    .clk, .rst_n, .bus_addr, .bus_we, .bus_re, .bus_wdata, .bus_rdata, .irq,
    .phy_mode, .sync_thr, .rx_enable,
    .ptx_valid, .ptx_ready, .ptx_data, .phy_tx_req, .phy_tx_len,
    .prx_valid, .prx_ready, .prx_data, .prx_first, .prx_len);

  tx_baseband #(.PAD_MIN(PAD_MIN)) u_tx (
    .clk, .rst_n, .start(phy_tx_req), .frame_len(phy_tx_len), .mode(phy_mode), .busy(tx_active),
    .byte_valid(ptx_valid), .byte_ready(ptx_ready), .byte_data(ptx_data),
    .dac_valid, .dac_ready, .dac_i, .dac_q, .dac_pre);

  rx_baseband u_rx (
    .clk, .rst_n, .enable(rx_enable), .mode(phy_mode), .sync_thr,
    .adc_valid, .adc_i, .adc_q,
    .out_valid(prx_valid), .out_ready(prx_ready), .out_data(prx_data), .out_first(prx_first), .out_len(prx_len),
    .synced(rx_synced), .sync_flat(rx_flat), .sync_peak(rx_peak), .chan_est_done(rx_est_done),
    .sample_overflow(rx_overflow), .cfo_step(rx_cfo_step));
endmodule
