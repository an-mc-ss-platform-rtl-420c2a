// MC-SS baseband receiver: 12-bit I/Q samples in, MAC frame bytes out.
// Chain: time synchroniser (autocorrelation flat region + cross-correlation
// peak, cyclic prefix removal) -> carrier frequency offset correction
// (estimate from the preamble autocorrelation) -> sample FIFO -> 256-point FFT -> LS channel
// estimation on the full-pilot symbol and zero-forcing equalisation ->
// deframer (data bins) -> multicode despreader -> soft demapper ->
// de-interleaver -> parallel-to-serial and de-puncturing -> Viterbi decoder
// -> byte assembler. The byte assembler reads the 16-bit length header
// (LSB first), then emits that many bytes, the first with out_first and the
// length on out_len. After the last byte all stages are cleared and the
// synchroniser searches again. Samples arrive with in_valid and no
// back-pressure; the sample FIFO absorbs the FFT time, so the clock must be
// at least about six times the sample rate. The mode is given by
// configuration, not detected. AGC is not part of this block. The chain order is the modem's.
module rx_baseband
  import mhdr_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic [2:0]         mode,
  input  logic [6:0]         sync_thr,
  input  logic               adc_valid,
  input  logic signed [11:0] adc_i,
  input  logic signed [11:0] adc_q,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [7:0]         out_data,
  output logic               out_first,
  output logic [15:0]        out_len,
  output logic               synced,
  output logic               sync_flat,       // autocorrelation above threshold
  output logic               sync_peak,       // cross-correlation peak in window
  output logic               chan_est_done,   // pilot symbol processed
  output logic               sample_overflow,
  output logic signed [23:0] cfo_step         // estimated phase step per sample, 2^24 = one cycle
);
  mode_e md;
  logic  clr;
  assign md = mode_e'(mode);

  // ---------------- synchronisation and FFT ----------------
  logic sy_valid, sy_first;
  logic signed [11:0] sy_i, sy_q;
  logic sf_ready, q_valid, q_ready;
  logic [24:0] q_data;   // {window start, I, Q}; the FFT counts samples itself
  logic signed [19:0] ff_i, ff_q, eq_i, eq_q, df_i, df_q, ds_i, ds_q;
  logic ff_valid, ff_ready, ff_first, eq_valid, eq_ready, eq_first;
  logic df_valid, df_ready, ds_valid, ds_ready;

  logic signed [47:0] acor_re, acor_im;
  logic               acor_valid, cf_valid, cf_first;
  logic signed [11:0] cf_i, cf_q;

  sync_detector #(.DW(12)) u_sync (.clk, .rst_n, .clear(clr || !enable), .thr_pct(sync_thr),
                   .in_valid(adc_valid), .in_i(adc_i), .in_q(adc_q),
                   .out_valid(sy_valid), .out_i(sy_i), .out_q(sy_q), .out_first(sy_first),
                   .synced, .flat(sync_flat), .peak(sync_peak),
                   .acor_re, .acor_im, .acor_valid);
  cfo_corrector #(.DW(12), .AW(48), .LAG(PRE_PERIOD)) u_cfo (.clk, .rst_n, .est(acor_valid),
                   .c_re(acor_re), .c_im(acor_im), .run(synced), .tick(adc_valid),
                   .in_valid(sy_valid), .in_first(sy_first), .in_i(sy_i), .in_q(sy_q),
                   .out_valid(cf_valid), .out_first(cf_first), .out_i(cf_i), .out_q(cf_q), .step(cfo_step));
  sync_fifo #(.W(25), .DEPTH(1024)) u_sf (.clk, .rst_n, .clear(clr), .in_valid(cf_valid), .in_ready(sf_ready),
                   .in_data({cf_first, cf_i, cf_q}), .out_valid(q_valid), .out_ready(q_ready), .out_data(q_data), .count());
  assign sample_overflow = cf_valid && !sf_ready;

  fft_core #(.N(N_FFT), .DW(20), .INVERSE(1'b0)) u_fft (.clk, .rst_n(rst_n && !clr),
                   .in_valid(q_valid), .in_ready(q_ready),
                   .in_i(20'(signed'(q_data[23:12]))), .in_q(20'(signed'(q_data[11:0]))),
                   .out_valid(ff_valid), .out_ready(ff_ready), .out_i(ff_i), .out_q(ff_q), .out_first(ff_first));
  chan_est_eq #(.DW(20)) u_eq (.clk, .rst_n, .clear(clr), .in_valid(ff_valid), .in_ready(ff_ready),
                   .in_i(ff_i), .in_q(ff_q), .out_valid(eq_valid), .out_ready(eq_ready),
                   .out_i(eq_i), .out_q(eq_q), .out_first(eq_first), .est_done(chan_est_done));
  ofdm_deframer #(.DW(20)) u_df (.clk, .rst_n, .in_valid(eq_valid), .in_ready(eq_ready), .in_i(eq_i), .in_q(eq_q),
                   .in_first(eq_first), .out_valid(df_valid), .out_ready(df_ready), .out_i(df_i), .out_q(df_q));
  mc_despreader #(.DW(20), .SF(SF)) u_ds (.clk, .rst_n, .clear(clr), .in_valid(df_valid), .in_ready(df_ready),
                   .in_i(df_i), .in_q(df_q), .out_valid(ds_valid), .out_ready(ds_ready), .out_i(ds_i), .out_q(ds_q));

  // ---------------- demapping and decoding ----------------
  logic signed [3:0] llr [6];
  logic signed [3:0] dl  [6];
  logic [23:0] llr_w, dl_w;
  logic dl_valid, dl_ready, dp_valid, dp_ready, vb_valid, vb_ready, vb_bit;
  logic signed [3:0] dp_a, dp_b;

  soft_demapper #(.DW(20), .SW(4)) u_dm (.nbits(3'(bits_per_sym(md))), .y_i(ds_i), .y_q(ds_q), .llr);
  always_comb begin
    for (int k = 0; k < 6; k++) begin
      llr_w[4*k +: 4] = llr[k];
      dl[k] = dl_w[4*k +: 4];
    end
  end
  sym_interleaver #(.W(24), .NWORDS(N_DATA), .ROWS(16), .INVERSE(1'b1)) u_dil (.clk, .rst_n, .clear(clr),
                   .in_valid(ds_valid), .in_ready(ds_ready), .in_word(llr_w),
                   .out_valid(dl_valid), .out_ready(dl_ready), .out_word(dl_w));
  depuncturer #(.SW(4)) u_dp (.clk, .rst_n, .clear(clr), .rate(code_rate(md)), .nbits(3'(bits_per_sym(md))),
                   .in_valid(dl_valid), .in_ready(dl_ready), .in_soft(dl),
                   .out_valid(dp_valid), .out_ready(dp_ready), .out_a(dp_a), .out_b(dp_b));
  viterbi_decoder #(.SW(4), .DEPTH(40)) u_vit (.clk, .rst_n, .clear(clr), .in_valid(dp_valid), .in_ready(dp_ready),
                   .in_a(dp_a), .in_b(dp_b), .out_valid(vb_valid), .out_ready(vb_ready), .out_bit(vb_bit));

  // ---------------- byte assembler ----------------
  logic [31:0] bcnt;       // decoded bits so far in this frame
  logic [15:0] len_q;
  logic [7:0]  sh;
  logic        byte_full, first_pending;

  assign vb_ready  = !byte_full;
  assign out_valid = byte_full;
  assign out_data  = sh;
  assign out_len   = len_q;
  assign clr       = byte_full && out_ready && (bcnt == 32'd16 + 32'(len_q) * 8);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      bcnt          <= '0;
      len_q         <= '0;
      sh            <= '0;
      byte_full     <= 1'b0;
      first_pending <= 1'b1;
      out_first     <= 1'b0;
    end else begin
      if (byte_full && out_ready) begin
        byte_full     <= 1'b0;
        first_pending <= 1'b0;
      end
      if (vb_valid && vb_ready) begin
        bcnt <= bcnt + 32'd1;
        if (bcnt < 32'd16) len_q[bcnt[3:0]] <= vb_bit;
        else begin
          sh <= {vb_bit, sh[7:1]};
          if (bcnt[2:0] == 3'd7) begin
            byte_full <= 1'b1;
            out_first <= first_pending;
          end
        end
      end
    end
  end
endmodule
