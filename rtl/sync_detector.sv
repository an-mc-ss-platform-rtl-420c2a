// Receiver time synchroniser. A state machine updated on every received
// sample looks for the periodic synchronisation preamble in two steps:
//  1. Coarse: the lag-LAG autocorrelation C(n) = sum r(n) r*(n-LAG) over a
//     LAG-sample window is compared with THR percent of the window energy
//     P(n) (the autocorrelation's maximum). A periodic preamble gives a flat
//     region where |C| >= thr*P; once it has lasted MIN_FLAT samples the
//     cross-correlation window opens.
//  2. Fine: inside the window the input is cross-correlated with the known
//     sign pattern of one preamble period; a peak (|X| >= 3/4 of the window's
//     |re|+|im| energy) marks the end of a period. When the flat region ends,
//     the last peak fixes the symbol timing.
// The sample stream is delayed by DLY samples so the timing decision can be
// applied to samples that have not yet left. After synchronisation the
// module drops each cyclic prefix and passes the 256 FFT-window samples
// (out_first on the first), ADV samples early inside the prefix, until
// `clear`. Magnitudes use |re|+|im|. The two-step flat-region/peak scheme and
// the 68 % default threshold are the modem's; LAG, window, MIN_FLAT, the
// peak criterion, DLY and ADV are this design's choices. CFO estimation is not
// done here: the autocorrelation at each cross-correlation peak is handed
// out (acor_*) for the frequency offset estimator.
module sync_detector
  import mhdr_pkg::*;
#(
  parameter int DW       = 12,
  parameter int LAG      = PRE_PERIOD,
  parameter int MIN_FLAT = 64,
  parameter int DLY      = 128,
  parameter int ADV      = 3,
  parameter longint PMIN = 64 * 64 * 2,
  parameter int AW       = 48
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [6:0]           thr_pct,      // autocorrelation threshold, percent
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_i,
  output logic signed [DW-1:0] out_q,
  output logic                 out_first,
  output logic                 synced,
  output logic                 flat,
  output logic                 peak,
  // autocorrelation at the latest cross-correlation peak, for the
  // frequency offset estimate; acor_valid pulses when it is updated
  output logic signed [AW-1:0] acor_re,
  output logic signed [AW-1:0] acor_im,
  output logic                 acor_valid
);
  typedef logic signed [AW-1:0] acc_t;

  logic signed [DW-1:0] dli [DLY];
  logic signed [DW-1:0] dlq [DLY];

  acc_t c_re, c_im, p_sum, l1_sum;
  acc_t c_re_n, c_im_n, p_sum_n, l1_sum_n;

  function automatic acc_t aabs(input acc_t v);
    return v < 0 ? -v : v;
  endfunction

  // running sums: add the newest term, drop the one leaving the window
  always_comb begin
    acc_t xi, xq, ai, aq, bi, bq, ci, cq;
    xi = acc_t'(in_i);    xq = acc_t'(in_q);
    ai = acc_t'(dli[LAG-1]); aq = acc_t'(dlq[LAG-1]);      // r(n-LAG)
    bi = acc_t'(dli[LAG-1]); bq = acc_t'(dlq[LAG-1]);      // r(n-LAG) leaving energy window
    ci = acc_t'(dli[2*LAG-1]); cq = acc_t'(dlq[2*LAG-1]);  // r(n-2LAG)
    c_re_n   = c_re + (xi * ai + xq * aq) - (bi * ci + bq * cq);
    c_im_n   = c_im + (xq * ai - xi * aq) - (bq * ci - bi * cq);
    p_sum_n  = p_sum + (xi * xi + xq * xq) - (bi * bi + bq * bq);
    l1_sum_n = l1_sum + aabs(xi) + aabs(xq) - aabs(bi) - aabs(bq);
  end

  // cross-correlation with one preamble period ending at the newest sample
  acc_t x_re, x_im;
  always_comb begin
    acc_t wi, wq;
    x_re = '0;
    x_im = '0;
    for (int m = 0; m < PRE_PERIOD; m++) begin
      wi = (m == PRE_PERIOD - 1) ? acc_t'(in_i) : acc_t'(dli[PRE_PERIOD-2-m]);
      wq = (m == PRE_PERIOD - 1) ? acc_t'(in_q) : acc_t'(dlq[PRE_PERIOD-2-m]);
      // conj(p) * w with p = si + j sq, si/sq = +-1
      x_re = x_re + (PRE_SIGN_I[m] ? -wi : wi) + (PRE_SIGN_Q[m] ? -wq : wq);
      x_im = x_im + (PRE_SIGN_I[m] ? -wq : wq) - (PRE_SIGN_Q[m] ? -wi : wi);
    end
  end

  logic flat_now, peak_now;
  assign flat_now = (p_sum_n > acc_t'(PMIN)) &&
                    ((aabs(c_re_n) + aabs(c_im_n)) * 100 >= p_sum_n * acc_t'(thr_pct));
  assign peak_now = (aabs(x_re) + aabs(x_im)) * 4 >= l1_sum_n * 3 && l1_sum_n > 0;

  typedef enum logic [1:0] { S_SEARCH, S_WINDOW, S_WAIT, S_RUN } st_e;
  st_e st;
  logic [15:0] flat_cnt;
  logic [15:0] to_start;
  logic        seen_peak;
  logic [8:0]  pos;         // position within the 266-sample symbol
  logic [15:0] to_start_now;

  assign to_start_now = to_start - 16'd1;
  assign out_i = dli[DLY-1];
  assign out_q = dlq[DLY-1];
  assign flat  = flat_now && in_valid;
  assign peak  = peak_now && in_valid && (st == S_WINDOW);
  assign synced = (st == S_RUN);

  // pass window samples: positions N_CP .. N_CP+N_FFT-1 of each symbol
  logic run_now;
  logic [8:0] pos_now;
  always_comb begin
    run_now = (st == S_RUN) || ((st == S_WAIT || st == S_WINDOW) && seen_peak && to_start_now == 16'd0);
    pos_now = (st == S_RUN) ? pos : 9'd0;
  end
  assign out_valid = in_valid && run_now && (pos_now >= 9'(N_CP));
  assign out_first = out_valid && (pos_now == 9'(N_CP));

  // the delay line is cleared with the running sums so they stay consistent
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < DLY; k++) begin
        dli[k] <= '0;
        dlq[k] <= '0;
      end
    end else if (in_valid) begin
      dli[0] <= in_i;
      dlq[0] <= in_q;
      for (int k = 1; k < DLY; k++) begin
        dli[k] <= dli[k-1];
        dlq[k] <= dlq[k-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acor_re    <= '0;
      acor_im    <= '0;
      acor_valid <= 1'b0;
    end else begin
      acor_valid <= peak;
      if (peak) begin
        acor_re <= c_re_n;
        acor_im <= c_im_n;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_re <= '0; c_im <= '0; p_sum <= '0; l1_sum <= '0;
    end else if (in_valid) begin
      c_re <= c_re_n; c_im <= c_im_n; p_sum <= p_sum_n; l1_sum <= l1_sum_n;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      st        <= S_SEARCH;
      flat_cnt  <= '0;
      to_start  <= '0;
      seen_peak <= 1'b0;
      pos       <= '0;
    end else if (in_valid) begin
      if (st != S_RUN) to_start <= to_start_now;
      case (st)
        S_SEARCH: begin
          seen_peak <= 1'b0;
          if (flat_now) begin
            flat_cnt <= flat_cnt + 16'd1;
            if (flat_cnt + 16'd1 >= 16'(MIN_FLAT)) st <= S_WINDOW;
          end else flat_cnt <= '0;
        end
        S_WINDOW: begin
          if (peak_now) begin
            seen_peak <= 1'b1;
            to_start  <= 16'(DLY + 1 - ADV);
          end
          if (!flat_now) st <= seen_peak ? S_WAIT : S_SEARCH;
          if (run_now) begin st <= S_RUN; pos <= 9'd1; end
        end
        S_WAIT: begin
          if (run_now) begin st <= S_RUN; pos <= 9'd1; end
          else if (to_start_now[15]) st <= S_SEARCH;
        end
        default: pos <= (pos == 9'(N_FFT + N_CP - 1)) ? 9'd0 : pos + 9'd1;
      endcase
    end
  end
endmodule
