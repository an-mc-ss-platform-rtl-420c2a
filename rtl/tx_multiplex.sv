// Transmit time-domain multiplexer with cyclic-prefix insertion.
// After `clear` it sends the synchronisation preamble (PRE_LEN samples, a
// periodic +-PRE_AMP pattern held in a computed read-only table), then, for
// each OFDM symbol delivered by the IFFT, the last N_CP = 10 samples followed
// by all N_FFT = 256 samples (266 samples per symbol). A two-symbol
// ping-pong buffer lets the next symbol be loaded while the current one is
// emitted; all transfers are valid/ready. Symbol and prefix lengths are the modem's; the
// preamble content and length are this design's choice.
module tx_multiplex
  import mhdr_pkg::*;
#(
  parameter int DW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_i,
  output logic signed [DW-1:0] out_q,
  output logic                 out_pre,    // sample belongs to the preamble
  output logic                 out_sym_start
);
  // ping-pong symbol buffer: one half is loaded from the IFFT while the
  // other is emitted, so the samples leave without gaps
  logic signed [DW-1:0] br [2][N_FFT];
  logic signed [DW-1:0] bq [2][N_FFT];
  logic [1:0] full;
  logic       wb, rb;
  logic       pre;        // preamble still being sent
  logic [8:0] ocnt;       // output position (preamble or prefix+symbol)
  logic [7:0] wcnt;
  logic [7:0] rd;

  assign rd = (ocnt < 9'(N_CP)) ? 8'(N_FFT - N_CP + int'(ocnt)) : 8'(ocnt - 9'(N_CP));

  assign in_ready      = !full[wb];
  assign out_valid     = pre || full[rb];
  assign out_pre       = pre;
  assign out_sym_start = !pre && full[rb] && (ocnt == '0);

  always_comb begin
    if (pre) begin
      out_i = PRE_SIGN_I[ocnt[5:0]] ? DW'(-PRE_AMP) : DW'(PRE_AMP);
      out_q = PRE_SIGN_Q[ocnt[5:0]] ? DW'(-PRE_AMP) : DW'(PRE_AMP);
    end else begin
      out_i = br[rb][rd];
      out_q = bq[rb][rd];
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      br[wb][wcnt] <= in_i;
      bq[wb][wcnt] <= in_q;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      pre  <= 1'b1;
      full <= '0;
      wb   <= 1'b0;
      rb   <= 1'b0;
      ocnt <= '0;
      wcnt <= '0;
    end else begin
      if (in_valid && in_ready) begin
        wcnt <= wcnt + 8'd1;
        if (wcnt == 8'(N_FFT - 1)) begin
          full[wb] <= 1'b1;
          wb       <= ~wb;
        end
      end
      if (out_valid && out_ready) begin
        if (pre) begin
          if (ocnt == 9'(PRE_LEN - 1)) begin pre <= 1'b0; ocnt <= '0; end
          else ocnt <= ocnt + 9'd1;
        end else if (ocnt == 9'(N_FFT + N_CP - 1)) begin
          ocnt     <= '0;
          full[rb] <= 1'b0;
          rb       <= ~rb;
        end else ocnt <= ocnt + 9'd1;
      end
    end
  end
endmodule
