// Channel interleaver / de-interleaver over one OFDM symbol.
// The interleaver works on whole modulation-symbol words (N coded bits each),
// so its width follows the symbol and it runs at the symbol rate. A symbol of
// NWORDS = 192 words is written in order into one half of a ping-pong buffer
// while the other half is read out in permuted order. The permutation is a
// ROWS x COLS block (written by rows, read by columns); with INVERSE = 1 the
// module applies the inverse permutation and acts as the de-interleaver. The
// block permutation and the ping-pong buffer are this design's choices.
// Latency: the first word of a symbol leaves after the whole symbol is in.
module sym_interleaver #(
  parameter int W       = 6,
  parameter int NWORDS  = 192,
  parameter int ROWS    = 16,
  parameter bit INVERSE = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_word,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_word
);
  localparam int COLS = NWORDS / ROWS;
  localparam int AW   = $clog2(NWORDS);

  logic [W-1:0] mem [2][NWORDS];
  logic [1:0]   full;
  logic         wbank, rbank;
  logic [AW-1:0] wcnt, rcnt, raddr;

  initial assert (ROWS * COLS == NWORDS) else $error("NWORDS must be ROWS*COLS");

  always_comb begin
    if (!INVERSE) raddr = AW'((int'(rcnt) % ROWS) * COLS + int'(rcnt) / ROWS);
    else          raddr = AW'((int'(rcnt) % COLS) * ROWS + int'(rcnt) / COLS);
  end

  assign in_ready  = !full[wbank];
  assign out_valid = full[rbank];
  assign out_word  = mem[rbank][raddr];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wbank][wcnt] <= in_word;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      full  <= '0;
      wbank <= 1'b0;
      rbank <= 1'b0;
      wcnt  <= '0;
      rcnt  <= '0;
    end else begin
      if (in_valid && in_ready) begin
        if (wcnt == AW'(NWORDS - 1)) begin
          wcnt        <= '0;
          full[wbank] <= 1'b1;
          wbank       <= ~wbank;
        end else wcnt <= wcnt + 1'b1;
      end
      if (out_valid && out_ready) begin
        if (rcnt == AW'(NWORDS - 1)) begin
          rcnt        <= '0;
          full[rbank] <= 1'b0;
          rbank       <= ~rbank;
        end else rcnt <= rcnt + 1'b1;
      end
    end
  end
endmodule
