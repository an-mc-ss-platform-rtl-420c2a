// Serial-to-parallel converter between the puncturer and the interleaver.
// Collects `nbits` (2, 4 or 6 coded bits, one modulation symbol) serial bits
// and emits them as one word, right-aligned, the first received bit in the
// most significant used position. It accepts one bit per cycle while the
// word is being filled; the filled word is held in an output register until
// taken (valid/ready), during which no bit is accepted. Working at the bit
// rate with a valid strobe follows the modem's clocking scheme; the
// bit order is this design's choice. `clear` drops a partly filled word.
module bit_packer #(
  parameter int MAXW = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic [2:0]      nbits,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic            in_bit,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [MAXW-1:0] out_word
);
  logic [MAXW-1:0] sh;
  logic [2:0]      cnt;

  assign in_ready = !out_valid;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      cnt       <= '0;
      sh        <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (cnt + 3'd1 == nbits) begin
          out_word  <= {sh[MAXW-2:0], in_bit};
          out_valid <= 1'b1;
          cnt       <= '0;
          sh        <= '0;
        end else begin
          sh  <= {sh[MAXW-2:0], in_bit};
          cnt <= cnt + 3'd1;
        end
      end
    end
  end
endmodule
