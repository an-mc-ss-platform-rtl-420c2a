// MC-SS baseband transmitter: MAC frame bytes in, 12-bit I/Q samples out.
// On `start` (with the frame length in bytes and the mode latched) the bit
// source sends, LSB first, a 16-bit length header, the frame bytes taken
// from the packet FIFO, 6 zero tail bits and zero padding up to a whole
// number of OFDM symbols, with at least PAD_MIN padding bits so the
// receiver's Viterbi decoder can flush. The chain then is: convolutional
// encoder -> puncturer -> serial-to-parallel -> interleaver -> mapper ->
// multicode spreader -> OFDM framer (full-pilot symbol first) -> 256-point
// IFFT -> preamble / cyclic-prefix multiplexer. Every link is valid/ready,
// so the sample rate is set by dac_ready; the FIFO between framer and IFFT
// absorbs the transform time. When the preamble and all symbols have left,
// every stage is cleared and `busy` drops. The chain order is the modem's;
// the length header and padding rule are this design's choice.
module tx_baseband
  import mhdr_pkg::*;
#(
  parameter int PAD_MIN = 40
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [15:0]       frame_len,
  input  logic [2:0]        mode,
  output logic              busy,
  // frame bytes
  input  logic              byte_valid,
  output logic              byte_ready,
  input  logic [7:0]        byte_data,
  // samples to the DAC
  output logic              dac_valid,
  input  logic              dac_ready,
  output logic signed [11:0] dac_i,
  output logic signed [11:0] dac_q,
  output logic              dac_pre
);
  mode_e       md;
  logic        clr;
  logic [15:0] len_q;
  logic [31:0] nbits_total, bit_cnt, info_per_sym, nsym, samp_cnt, samp_total;

  // ---------------- bit source ----------------
  logic [2:0] bidx;
  logic       src_valid, src_ready, src_bit;
  logic       in_payload;

  assign info_per_sym = 32'(info_bits_per_ofdm(md));
  assign in_payload   = (bit_cnt >= 32'd16) && (bit_cnt < 32'd16 + 32'(len_q) * 8);
  assign src_valid    = busy && (bit_cnt < nbits_total) && (!in_payload || byte_valid);
  assign src_bit      = (bit_cnt < 32'd16) ? len_q[bit_cnt[3:0]] :
                        in_payload ? byte_data[bidx] : 1'b0;
  assign byte_ready   = busy && in_payload && src_ready && (bidx == 3'd7);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      md          <= M_QPSK_12;
      len_q       <= '0;
      bit_cnt     <= '0;
      bidx        <= '0;
      nbits_total <= '0;
      nsym        <= '0;
      samp_cnt    <= '0;
    end else if (!busy) begin
      if (start) begin
        busy     <= 1'b1;
        md       <= mode_e'(mode);
        len_q    <= frame_len;
        bit_cnt  <= '0;
        bidx     <= '0;
        samp_cnt <= '0;
      end
    end else begin
      if (src_valid && src_ready) begin
        bit_cnt <= bit_cnt + 32'd1;
        if (in_payload) bidx <= bidx + 3'd1;
      end
      if (dac_valid && dac_ready) samp_cnt <= samp_cnt + 32'd1;
      if (clr) busy <= 1'b0;
    end
    // frame size from the latched length and mode (one cycle after start)
    if (rst_n && busy) begin
      nsym        <= (32'(len_q) * 8 + 32'd16 + 32'(N_TAIL) + 32'(PAD_MIN) + info_per_sym - 1) / info_per_sym;
      nbits_total <= ((32'(len_q) * 8 + 32'd16 + 32'(N_TAIL) + 32'(PAD_MIN) + info_per_sym - 1) / info_per_sym) * info_per_sym;
    end
  end

  assign samp_total = 32'(PRE_LEN) + (nsym + 32'd1) * 32'(N_FFT + N_CP);
  assign clr        = busy && (nsym != 0) && (samp_cnt == samp_total);

  // ---------------- coding ----------------
  logic       enc_valid, enc_ready;
  logic [1:0] enc_pair;
  logic       pun_valid, pun_ready, pun_bit;
  logic       pk_valid, pk_ready;
  logic [5:0] pk_word;
  logic       il_valid, il_ready;
  logic [5:0] il_word;

  conv_encoder u_enc (.clk, .rst_n, .clear(clr), .in_valid(src_valid), .in_ready(src_ready), .in_bit(src_bit),
                      .out_valid(enc_valid), .out_ready(enc_ready), .out_pair(enc_pair));
  puncturer u_pun (.clk, .rst_n, .clear(clr), .rate(code_rate(md)), .in_valid(enc_valid), .in_ready(enc_ready),
                   .in_pair(enc_pair), .out_valid(pun_valid), .out_ready(pun_ready), .out_bit(pun_bit));
  bit_packer #(.MAXW(6)) u_s2p (.clk, .rst_n, .clear(clr), .nbits(3'(bits_per_sym(md))), .in_valid(pun_valid),
                   .in_ready(pun_ready), .in_bit(pun_bit), .out_valid(pk_valid), .out_ready(pk_ready), .out_word(pk_word));
  sym_interleaver #(.W(6), .NWORDS(N_DATA), .ROWS(16), .INVERSE(1'b0)) u_il (.clk, .rst_n, .clear(clr),
                   .in_valid(pk_valid), .in_ready(pk_ready), .in_word(pk_word),
                   .out_valid(il_valid), .out_ready(il_ready), .out_word(il_word));

  // ---------------- modulation ----------------
  logic signed [15:0] map_i, map_q, sp_i, sp_q, fr_i, fr_q;
  logic sp_valid, sp_ready, fr_valid, fr_ready, fr_first, fr_est;
  logic q_valid, q_ready;
  logic [31:0] q_data;
  logic signed [19:0] if_i, if_q;
  logic if_valid, if_ready, if_first;
  logic mx_valid;
  logic signed [19:0] mx_i, mx_q;
  logic mx_start;

  qam_mapper #(.DW(16)) u_map (.nbits(3'(bits_per_sym(md))), .word(il_word), .sym_i(map_i), .sym_q(map_q));
  mc_spreader #(.DW(16), .SF(SF)) u_sp (.clk, .rst_n, .clear(clr), .in_valid(il_valid), .in_ready(il_ready),
                   .in_i(map_i), .in_q(map_q), .out_valid(sp_valid), .out_ready(sp_ready), .out_i(sp_i), .out_q(sp_q));
  ofdm_framer #(.DW(16)) u_fr (.clk, .rst_n, .clear(clr), .in_valid(sp_valid), .in_ready(sp_ready),
                   .in_i(sp_i), .in_q(sp_q), .out_valid(fr_valid), .out_ready(fr_ready),
                   .out_i(fr_i), .out_q(fr_q), .out_first(fr_first), .out_est(fr_est));
  sync_fifo #(.W(32), .DEPTH(512)) u_bf (.clk, .rst_n, .clear(clr), .in_valid(fr_valid), .in_ready(fr_ready),
                   .in_data({fr_i, fr_q}), .out_valid(q_valid), .out_ready(q_ready), .out_data(q_data), .count());
  fft_core #(.N(N_FFT), .DW(20), .INVERSE(1'b1)) u_ifft (.clk, .rst_n(rst_n && !clr),
                   .in_valid(q_valid), .in_ready(q_ready),
                   .in_i(20'(signed'(q_data[31:16]))), .in_q(20'(signed'(q_data[15:0]))),
                   .out_valid(if_valid), .out_ready(if_ready), .out_i(if_i), .out_q(if_q), .out_first(if_first));
  tx_multiplex #(.DW(20)) u_mx (.clk, .rst_n, .clear(clr), .in_valid(if_valid), .in_ready(if_ready),
                   .in_i(if_i), .in_q(if_q), .out_valid(mx_valid), .out_ready(dac_ready && busy && !clr),
                   .out_i(mx_i), .out_q(mx_q), .out_pre(dac_pre), .out_sym_start(mx_start));

  function automatic logic signed [11:0] sat12(input logic signed [19:0] v);
    if (v > 20'sd2047)  return 12'sd2047;
    if (v < -20'sd2047) return -12'sd2047;
    return 12'(v);
  endfunction

  assign dac_valid = busy && mx_valid && !clr;
  assign dac_i     = sat12(mx_i);
  assign dac_q     = sat12(mx_q);
endmodule
