// N-point radix-2 FFT / IFFT (N = 256 for the 40 MHz configuration), used as
// the OFDM modulator (INVERSE = 1) and demodulator (INVERSE = 0).
// Iterative decimation-in-time: N samples are written in bit-reversed order
// into a working memory (N cycles), then log2(N) stages of N/2 butterflies
// run at one butterfly per cycle, each reading and writing two words of the
// memory in place, then the N results leave in natural order (N cycles,
// valid/ready). Twiddles exp(-/+ j*2*pi*k/N) are computed at elaboration in
// Q1.(TW-2) format. The inverse transform halves every stage (rounding half to even),
// i.e. divides by N; the forward transform does not scale. A transform takes
// N + N/2*log2(N) + N cycles (1536 for N = 256). The transform size is the
// modem's; the architecture and scaling are this design's choice.
module fft_core #(
  parameter int N       = 256,
  parameter int DW      = 20,
  parameter int TW      = 16,
  parameter bit INVERSE = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_i,
  output logic signed [DW-1:0] out_q,
  output logic                 out_first   // high with bin/sample 0
);
  localparam int LOGN = $clog2(N);
  localparam int AW   = LOGN;
  localparam real PI  = 3.14159265358979323846;
  localparam int  ONE = 1 << (TW - 2);

  typedef logic signed [TW-1:0] tw_arr_t [N/2];

  function automatic tw_arr_t mk_cos();
    tw_arr_t a;
    for (int k = 0; k < N / 2; k++) a[k] = TW'($rtoi($floor($cos(2.0 * PI * k / N) * ONE + 0.5)));
    return a;
  endfunction
  function automatic tw_arr_t mk_sin();
    tw_arr_t a;
    for (int k = 0; k < N / 2; k++) a[k] = TW'($rtoi($floor($sin(2.0 * PI * k / N) * ONE + 0.5)));
    return a;
  endfunction
  localparam tw_arr_t COS_T = mk_cos();
  localparam tw_arr_t SIN_T = mk_sin();

  typedef enum logic [1:0] { S_LOAD, S_CALC, S_OUT } st_e;
  st_e st;

  logic signed [DW-1:0] mr [N];
  logic signed [DW-1:0] mi [N];

  logic [AW-1:0]   cnt;       // load / unload counter, butterfly counter
  logic [AW-2:0]   bf;        // butterfly index in stage
  logic [$clog2(LOGN+1)-1:0] stage;

  function automatic logic [AW-1:0] bitrev(input logic [AW-1:0] a);
    for (int b = 0; b < AW; b++) bitrev[b] = a[AW-1-b];
  endfunction

  // butterfly addressing
  logic [AW-1:0] half, pos, grp, i0, i1;
  logic [AW-2:0] tidx;
  always_comb begin
    half = AW'(1) << stage;
    pos  = AW'(bf) & (half - 1'b1);
    grp  = AW'(bf) >> stage;
    i0   = (grp << (stage + 1)) | pos;
    i1   = i0 | half;
    tidx = (AW-1)'(pos << (LOGN - 1 - int'(stage)));
  end

  // halving with round-half-to-even: unlike (x + 1) >>> 1 it adds no average
  // bias, which would otherwise build up over the stages into a DC offset
  function automatic logic signed [DW+1:0] half_rne(input logic signed [DW+1:0] x);
    return (x >>> 1) + (DW+2)'(x[0] & x[1]);
  endfunction

  // complex butterfly: x0 + W x1, x0 - W x1, W = cos -/+ j sin
  localparam int PW = DW + TW;
  logic signed [PW-1:0] pr, pi;
  logic signed [DW+1:0] tr, ti, ar, ai, br, bi;
  logic signed [TW-1:0] wc, ws;
  always_comb begin
    wc = COS_T[tidx];
    ws = INVERSE ? SIN_T[tidx] : -SIN_T[tidx];
    pr = PW'(mr[i1]) * PW'(wc) - PW'(mi[i1]) * PW'(ws);
    pi = PW'(mr[i1]) * PW'(ws) + PW'(mi[i1]) * PW'(wc);
    // back to data scale with rounding
    tr = (DW+2)'((pr + PW'(ONE / 2)) >>> (TW - 2));
    ti = (DW+2)'((pi + PW'(ONE / 2)) >>> (TW - 2));
    ar = (DW+2)'(mr[i0]) + tr;
    ai = (DW+2)'(mi[i0]) + ti;
    br = (DW+2)'(mr[i0]) - tr;
    bi = (DW+2)'(mi[i0]) - ti;
    if (INVERSE) begin
      ar = half_rne(ar);
      ai = half_rne(ai);
      br = half_rne(br);
      bi = half_rne(bi);
    end
  end

  assign in_ready  = (st == S_LOAD);
  assign out_valid = (st == S_OUT);
  assign out_i     = mr[cnt];
  assign out_q     = mi[cnt];
  assign out_first = (st == S_OUT) && (cnt == '0);

  always_ff @(posedge clk) begin
    if (st == S_LOAD && in_valid) begin
      mr[bitrev(cnt)] <= in_i;
      mi[bitrev(cnt)] <= in_q;
    end else if (st == S_CALC) begin
      mr[i0] <= DW'(ar);
      mi[i0] <= DW'(ai);
      mr[i1] <= DW'(br);
      mi[i1] <= DW'(bi);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st    <= S_LOAD;
      cnt   <= '0;
      bf    <= '0;
      stage <= '0;
    end else begin
      case (st)
        S_LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) begin
            st    <= S_CALC;
            bf    <= '0;
            stage <= '0;
          end
        end
        S_CALC: begin
          bf <= bf + 1'b1;
          if (bf == (AW-1)'(N / 2 - 1)) begin
            if (int'(stage) == LOGN - 1) begin
              st  <= S_OUT;
              cnt <= '0;
            end else stage <= stage + 1'b1;
          end
        end
        default: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) st <= S_LOAD;
        end
      endcase
    end
  end
endmodule
