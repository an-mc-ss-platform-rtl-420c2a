// Global controller of the MAC hardware, with its AES unit and CRC units.
// Transmit: on tx_start it moves a frame from the TX FIFO to the
// packet-formatted TX FIFO: the HDR_LEN = 10 header bytes unchanged, then
// tx_len payload bytes, XORed with an AES-128 counter-mode keystream when
// tx_encrypt is set (block j of the payload uses AES(key, nonce + j)), then
// the 4-byte CRC-32 frame check sequence over the payload as sent. When the
// whole frame is in the packet FIFO it pulses phy_tx_req with the frame
// length for the baseband.
// Receive: a frame from the baseband arrives as a byte stream whose first
// byte carries rx_first and the frame length. The header is parsed and the
// destination id (byte 4) verified against dev_id (0xFF = broadcast). For an
// accepted frame the header and the payload (decrypted when rx_decrypt) go
// to the RX FIFO, the received FCS is checked, and rx_event pulses with the
// CRC and address results (raising the interrupt); other frames are dropped.
// One AES core is shared by both directions; transmit has priority. Every
// byte moves under valid/ready. The flow (FIFOs, AES, CRC, parsing, address
// verification, interrupt) follows the modem's MAC hardware; the frame layout,
// CTR mode and arbitration are this design's choices.
module hwmac_ctrl #(
  parameter int HDR_LEN = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  // configuration
  input  logic         tx_start,
  input  logic         tx_encrypt,
  input  logic [11:0]  tx_len,
  input  logic         rx_enable,
  input  logic         rx_decrypt,
  input  logic [7:0]   dev_id,
  input  logic [127:0] aes_key,
  input  logic [127:0] aes_nonce,
  // TX FIFO (from software)
  input  logic         txf_valid,
  output logic         txf_ready,
  input  logic [7:0]   txf_data,
  // packet-formatted TX FIFO (to baseband)
  output logic         pk_valid,
  input  logic         pk_ready,
  output logic [7:0]   pk_data,
  output logic         phy_tx_req,
  output logic [15:0]  phy_tx_len,
  // frame bytes from the baseband
  input  logic         prx_valid,
  output logic         prx_ready,
  input  logic [7:0]   prx_data,
  input  logic         prx_first,
  input  logic [15:0]  prx_len,
  // RX FIFO (to software)
  output logic         rxf_valid,
  input  logic         rxf_ready,
  output logic [7:0]   rxf_data,
  // status
  output logic         tx_busy,
  output logic         rx_event,
  output logic         rx_crc_ok,
  output logic         rx_addr_ok,
  output logic [15:0]  rx_len
);
  // ---------------- shared AES core ----------------
  logic         aes_start, aes_busy, aes_done;
  logic [127:0] aes_in, aes_out;
  logic         tx_need, rx_need, owner_rx, owner_act;
  logic [127:0] tx_ctr, rx_ctr;
  logic [127:0] tx_ks, rx_ks;

  aes128_core u_aes (.clk, .rst_n, .start(aes_start), .key(aes_key), .block_in(aes_in),
                     .busy(aes_busy), .done(aes_done), .block_out(aes_out));

  assign aes_start = !owner_act && !aes_busy && (tx_need || rx_need);
  assign aes_in    = tx_need ? tx_ctr : rx_ctr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      owner_act <= 1'b0;
      owner_rx  <= 1'b0;
    end else if (aes_start) begin
      owner_act <= 1'b1;
      owner_rx  <= !tx_need;
    end else if (aes_done) begin
      owner_act <= 1'b0;
    end
  end

  function automatic logic [7:0] ksb(input logic [127:0] ks, input logic [3:0] i);
    return ks[127 - 8 * int'(i) -: 8];
  endfunction

  // ---------------- transmit ----------------
  typedef enum logic [2:0] { T_IDLE, T_HDR, T_KS, T_PAY, T_FCS, T_REQ } tst_e;
  tst_e ts;
  logic [11:0] tcnt, tlen;
  logic        tenc;
  logic [31:0] tcrc;
  logic        tcrc_init, tcrc_en;
  logic [7:0]  tbyte;

  crc32 u_tcrc (.clk, .rst_n, .init(tcrc_init), .in_valid(tcrc_en), .in_byte(tbyte), .crc(tcrc));

  assign tbyte     = tenc ? (txf_data ^ ksb(tx_ks, tcnt[3:0])) : txf_data;
  assign tcrc_init = (ts == T_IDLE);
  assign tcrc_en   = (ts == T_PAY) && txf_valid && pk_ready;
  assign tx_need   = (ts == T_KS) && !(owner_act && !owner_rx);
  assign tx_busy   = (ts != T_IDLE);
  assign tx_ctr    = aes_nonce + 128'(tcnt >> 4);

  always_comb begin
    pk_valid  = 1'b0;
    pk_data   = txf_data;
    txf_ready = 1'b0;
    case (ts)
      T_HDR: begin pk_valid = txf_valid; txf_ready = pk_ready; end
      T_PAY: begin pk_valid = txf_valid; txf_ready = pk_ready; pk_data = tbyte; end
      T_FCS: begin pk_valid = 1'b1; pk_data = tcrc[8 * tcnt[1:0] +: 8]; end
      default: ;
    endcase
  end

  assign phy_tx_req = (ts == T_REQ);
  assign phy_tx_len = 16'(HDR_LEN) + 16'(tlen) + 16'd4;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ts    <= T_IDLE;
      tcnt  <= '0;
      tlen  <= '0;
      tenc  <= 1'b0;
      tx_ks <= '0;
    end else begin
      if (aes_done && !owner_rx) tx_ks <= aes_out;
      case (ts)
        T_IDLE: if (tx_start) begin
          ts <= T_HDR; tcnt <= '0; tlen <= tx_len; tenc <= tx_encrypt;
        end
        T_HDR: if (txf_valid && pk_ready) begin
          if (tcnt == 12'(HDR_LEN - 1)) begin
            tcnt <= '0;
            ts   <= (tlen == 0) ? T_FCS : (tenc ? T_KS : T_PAY);
          end else tcnt <= tcnt + 12'd1;
        end
        T_KS: if (aes_done && !owner_rx) ts <= T_PAY;
        T_PAY: if (txf_valid && pk_ready) begin
          if (tcnt == tlen - 12'd1) begin
            tcnt <= '0;
            ts   <= T_FCS;
          end else begin
            tcnt <= tcnt + 12'd1;
            if (tenc && tcnt[3:0] == 4'hF) ts <= T_KS;
          end
        end
        T_FCS: if (pk_ready) begin
          if (tcnt[1:0] == 2'd3) ts <= T_REQ;
          tcnt <= tcnt + 12'd1;
        end
        default: ts <= T_IDLE;
      endcase
    end
  end

  // ---------------- receive ----------------
  typedef enum logic [2:0] { R_IDLE, R_HDR, R_HOUT, R_KS, R_PAY, R_FCS, R_DROP, R_DONE } rst_e;
  rst_e rs;
  logic [15:0] rcnt, rplen, rrem;
  logic [7:0]  hdr [HDR_LEN];
  logic        rdec, addr_ok_q;
  logic [31:0] rcrc, rfcs;
  logic        rcrc_init, rcrc_en;
  logic [7:0]  rbyte;

  crc32 u_rcrc (.clk, .rst_n, .init(rcrc_init), .in_valid(rcrc_en), .in_byte(prx_data), .crc(rcrc));

  assign rbyte     = rdec ? (prx_data ^ ksb(rx_ks, rcnt[3:0])) : prx_data;
  assign rcrc_init = (rs == R_IDLE);
  assign rcrc_en   = (rs == R_PAY) && prx_valid && rxf_ready;
  assign rx_need   = (rs == R_KS) && !(owner_act && owner_rx) && !tx_need;
  assign rx_ctr    = aes_nonce + 128'(rcnt >> 4);

  always_comb begin
    rxf_valid = 1'b0;
    rxf_data  = rbyte;
    prx_ready = 1'b0;
    case (rs)
      R_IDLE: prx_ready = !rx_enable || !prx_first;   // discard stray bytes
      R_HDR:  prx_ready = 1'b1;
      R_HOUT: begin rxf_valid = 1'b1; rxf_data = hdr[rcnt[3:0]]; end
      R_PAY:  begin rxf_valid = prx_valid; prx_ready = rxf_ready; end
      R_FCS, R_DROP: prx_ready = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rs         <= R_IDLE;
      rcnt       <= '0;
      rplen      <= '0;
      rrem       <= '0;
      rdec       <= 1'b0;
      addr_ok_q  <= 1'b0;
      rfcs       <= '0;
      rx_ks      <= '0;
      rx_event   <= 1'b0;
      rx_crc_ok  <= 1'b0;
      rx_addr_ok <= 1'b0;
      rx_len     <= '0;
      for (int i = 0; i < HDR_LEN; i++) hdr[i] <= '0;
    end else begin
      rx_event <= 1'b0;
      if (aes_done && owner_rx) rx_ks <= aes_out;
      case (rs)
        R_IDLE: if (rx_enable && prx_valid && prx_first) begin
          // the first byte is taken in R_HDR
          rs    <= R_HDR;
          rcnt  <= '0;
          rplen <= prx_len - 16'(HDR_LEN + 4);
          rrem  <= prx_len;
          rdec  <= rx_decrypt;
        end
        R_HDR: if (prx_valid) begin
          hdr[rcnt[3:0]] <= prx_data;
          rrem <= rrem - 16'd1;
          if (rcnt == 16'(HDR_LEN - 1)) begin
            addr_ok_q <= (hdr[4] == dev_id) || (hdr[4] == 8'hFF);
            rs        <= ((hdr[4] == dev_id) || (hdr[4] == 8'hFF)) ? R_HOUT : R_DROP;
            rcnt      <= '0;
          end else rcnt <= rcnt + 16'd1;
        end
        R_HOUT: if (rxf_ready) begin
          if (rcnt == 16'(HDR_LEN - 1)) begin
            rcnt <= '0;
            rs   <= (rplen == 0) ? R_FCS : (rdec ? R_KS : R_PAY);
          end else rcnt <= rcnt + 16'd1;
        end
        R_KS: if (aes_done && owner_rx) rs <= R_PAY;
        R_PAY: if (prx_valid && rxf_ready) begin
          rrem <= rrem - 16'd1;
          if (rcnt == rplen - 16'd1) begin
            rcnt <= '0;
            rs   <= R_FCS;
          end else begin
            rcnt <= rcnt + 16'd1;
            if (rdec && rcnt[3:0] == 4'hF) rs <= R_KS;
          end
        end
        R_FCS: if (prx_valid) begin
          rfcs[8 * rcnt[1:0] +: 8] <= prx_data;
          rcnt <= rcnt + 16'd1;
          if (rcnt[1:0] == 2'd3) rs <= R_DONE;
        end
        R_DROP: if (prx_valid) begin
          rrem <= rrem - 16'd1;
          if (rrem == 16'd1) rs <= R_IDLE;
        end
        default: begin
          rx_event   <= 1'b1;
          rx_crc_ok  <= (rfcs == rcrc);
          rx_addr_ok <= addr_ok_q;
          rx_len     <= rplen;
          rs         <= R_IDLE;
        end
      endcase
    end
  end
endmodule
