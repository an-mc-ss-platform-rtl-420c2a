// Puncturer and serialiser. Takes coded pairs {a, b} from the rate-1/2
// encoder and emits single bits, dropping some to reach code rate 2/3 or 3/4.
// Patterns (IEEE 802.11a style, this design's choice): rate 1/2 sends a b;
// 2/3 sends a1 b1 a2 over two pairs; 3/4 sends a1 b1 a2 b3 over three pairs.
// One bit leaves per cycle when out_ready is high; a pair is consumed once
// its last kept bit has left. `clear` restarts the pattern at a frame start.
module puncturer
  import mhdr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  rate_e      rate,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [1:0] in_pair,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_bit
);
  logic [1:0] pidx;    // pair index in the puncturing period
  logic       half;    // 0: bit a, 1: bit b
  logic       keep_a, keep_b, last_bit;
  logic [1:0] period;

  always_comb begin
    keep_a = 1'b1;
    keep_b = 1'b1;
    period = 2'd1;
    case (rate)
      R_23: begin period = 2'd2; keep_b = (pidx == 2'd0); end
      R_34: begin period = 2'd3; keep_a = (pidx != 2'd2); keep_b = (pidx != 2'd1); end
      default: ;
    endcase
  end

  // which half is emitted now: a if kept and not yet sent, else b
  logic cur_b;
  assign cur_b     = half | ~keep_a;
  assign out_bit   = cur_b ? in_pair[0] : in_pair[1];
  assign out_valid = in_valid;
  assign last_bit  = cur_b | ~keep_b;
  assign in_ready  = out_ready & last_bit;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      pidx <= '0;
      half <= 1'b0;
    end else if (in_valid && out_ready) begin
      if (last_bit) begin
        half <= 1'b0;
        pidx <= (pidx == period - 2'd1) ? 2'd0 : pidx + 2'd1;
      end else begin
        half <= 1'b1;
      end
    end
  end
endmodule
