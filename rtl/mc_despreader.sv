// Multicode despreader, the inverse of the transmitter's spreader.
// Eight received (equalised) chips are collected and the inverse
// Walsh-Hadamard transform recovers the eight modulation symbols:
// sym_k = (1/SF) * sum_c (-1)^popcount(k & c) * chip_c, the division being an
// arithmetic shift by log2(SF). The symbols then leave one per cycle under a
// valid/ready handshake; a new group is collected while the previous one
// leaves, so the block sustains one chip per cycle. Spreading factor 8 is the modem's; Walsh-Hadamard codes are this
// design's choice, matching mc_spreader.
module mc_despreader #(
  parameter int DW = 16,
  parameter int SF = 8
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
  output logic signed [DW-1:0] out_q
);
  localparam int CW = $clog2(SF);

  logic signed [DW-1:0] bi [SF];   // group being collected
  logic signed [DW-1:0] bq [SF];
  logic signed [DW-1:0] oi [SF];   // group being emitted
  logic signed [DW-1:0] oq [SF];
  logic [CW:0]          cnt;      // symbols collected
  logic                 emitting;
  logic [CW-1:0]        chip;

  assign in_ready  = !(emitting && cnt == (CW+1)'(SF - 1) && !(out_ready && chip == CW'(SF - 1)));
  assign out_valid = emitting;

  always_comb begin
    logic signed [DW+CW-1:0] ai, aq;
    ai = '0;
    aq = '0;
    for (int k = 0; k < SF; k++) begin
      if ($countones(CW'(k) & chip) % 2 == 1) begin
        ai = ai - (DW+CW)'(oi[k]);
        aq = aq - (DW+CW)'(oq[k]);
      end else begin
        ai = ai + (DW+CW)'(oi[k]);
        aq = aq + (DW+CW)'(oq[k]);
      end
    end
    out_i = DW'(ai >>> CW);
    out_q = DW'(aq >>> CW);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      cnt      <= '0;
      emitting <= 1'b0;
      chip     <= '0;
    end else begin
      if (emitting && out_ready) begin
        if (chip == CW'(SF - 1)) emitting <= 1'b0;
        chip <= chip + 1'b1;
      end
      if (in_valid && in_ready) begin
        if (cnt == (CW+1)'(SF - 1)) begin
          cnt <= '0;
          for (int k = 0; k < SF - 1; k++) begin
            oi[k] <= bi[k];
            oq[k] <= bq[k];
          end
          oi[SF-1] <= in_i;
          oq[SF-1] <= in_q;
          emitting <= 1'b1;
          chip     <= '0;
        end else begin
          bi[cnt[CW-1:0]] <= in_i;
          bq[cnt[CW-1:0]] <= in_q;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
