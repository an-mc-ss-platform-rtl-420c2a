// Parallel-to-serial converter and de-puncturer in front of the Viterbi
// decoder. It takes one word of nbits soft values (one modulation symbol,
// entry nbits-1 first), serialises it and rebuilds the rate-1/2 pairs
// {a, b}, inserting a zero (erasure) metric wherever the transmitter's
// puncturer dropped a bit (same 2/3 and 3/4 patterns as puncturer). One pair
// leaves per cycle at most, valid/ready; `clear` restarts the pattern.
module depuncturer
  import mhdr_pkg::*;
#(
  parameter int SW = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  rate_e                rate,
  input  logic [2:0]           nbits,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [SW-1:0] in_soft [6],
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [SW-1:0] out_a,
  output logic signed [SW-1:0] out_b
);
  logic signed [SW-1:0] wbuf [6];
  logic [2:0]           nleft;
  logic                 have;      // a soft value is available
  logic signed [SW-1:0] s;
  logic [1:0]           pidx, period;
  logic                 half;
  logic signed [SW-1:0] a_reg;
  logic                 keep_a, keep_b;
  logic                 take;      // consume s this cycle

  assign have = (nleft != 3'd0);
  assign s    = wbuf[nleft - 3'd1];
  assign in_ready = !have;

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

  // half 0: gather a; half 1: emit pair
  always_comb begin
    out_valid = 1'b0;
    out_a     = a_reg;
    out_b     = '0;
    take      = 1'b0;
    if (half) begin
      if (keep_b) begin
        out_valid = have;
        out_b     = s;
        take      = have && out_ready;
      end else begin
        out_valid = 1'b1;
      end
    end else begin
      take = have && keep_a;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      nleft <= '0;
      half  <= 1'b0;
      pidx  <= '0;
      a_reg <= '0;
      for (int k = 0; k < 6; k++) wbuf[k] <= '0;
    end else begin
      if (!have && in_valid) begin
        wbuf  <= in_soft;
        nleft <= nbits;
      end else if (take) begin
        nleft <= nleft - 3'd1;
      end
      if (!half) begin
        if (take || !keep_a) begin
          a_reg <= keep_a ? s : '0;
          half  <= 1'b1;
        end
      end else if (out_valid && out_ready) begin
        half <= 1'b0;
        pidx <= (pidx == period - 2'd1) ? 2'd0 : pidx + 2'd1;
      end
    end
  end
endmodule
