// Multicode spreader with spreading factor SF = 8.
// Eight consecutive modulation symbols are each multiplied by one length-8
// Walsh-Hadamard code and the eight products are summed chip by chip, so all
// eight codes are in use (full load) and the eight resulting chips occupy
// eight data subcarriers. Chip c = sum_k (-1)^popcount(k & c) * sym_k. The
// block collects SF symbols, then emits SF chips one per cycle
// (valid/ready); a new group is collected while the previous one is
// emitted, so the block sustains one symbol per cycle. The spreading factor is the modem's; the code family is this
// design's choice.
module mc_spreader #(
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
    out_i = DW'(ai);
    out_q = DW'(aq);
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
