// Soft-decision Viterbi decoder for the rate-1/2, K = 7 convolutional code
// with generators 133 and 171 (octal).
// For each received pair {a, b} of SW-bit soft metrics (positive = bit 1,
// zero = erasure from the de-puncturer) all 64 states run add-compare-select
// in one cycle. Branch cost is (SMAX -/+ a) + (SMAX -/+ b); path metrics are
// renormalised every step by subtracting the smallest one. Survivors use
// register exchange of DEPTH bits: each state keeps the last DEPTH decided
// input bits of its best path. Once DEPTH pairs have entered, every new pair
// releases the oldest bit of the currently best state, so the decoded bit
// stream lags the input by DEPTH - 1 pairs and the caller must follow the
// data with at least DEPTH - 1 known bits (tail and padding). `clear` starts
// a frame in state 0. State numbering follows conv_encoder (bit 5 = newest).
// The code is the modem's; the decoder structure and depth are this design's.
module viterbi_decoder #(
  parameter int SW    = 4,
  parameter int DEPTH = 40,
  parameter int MW    = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [SW-1:0] in_a,
  input  logic signed [SW-1:0] in_b,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic                 out_bit
);
  localparam int NS   = 64;
  localparam int SMAX = (1 << (SW - 1)) - 1;
  localparam logic [6:0] G1 = 7'o133;
  localparam logic [6:0] G2 = 7'o171;

  logic [MW-1:0]    pm  [NS];
  logic [DEPTH-1:0] sv  [NS];
  logic [MW-1:0]    npm [NS];
  logic [DEPTH-1:0] nsv [NS];
  logic [15:0]      seen;
  logic [5:0]       best;

  function automatic logic [MW-1:0] bcost(input logic ea, input logic eb,
                                          input logic signed [SW-1:0] a,
                                          input logic signed [SW-1:0] b);
    int ca, cb;
    ca = ea ? SMAX - int'(a) : SMAX + int'(a);
    cb = eb ? SMAX - int'(b) : SMAX + int'(b);
    return MW'(ca + cb);
  endfunction

  // add-compare-select
  always_comb begin
    logic [5:0]    p0, p1;
    logic          u;
    logic [6:0]    w0, w1;
    logic [MW-1:0] m0, m1;
    for (int ns = 0; ns < NS; ns++) begin
      u  = ns[5];
      p0 = {ns[4:0], 1'b0};
      p1 = {ns[4:0], 1'b1};
      w0 = {u, p0};
      w1 = {u, p1};
      m0 = pm[p0] + bcost(^(w0 & G1), ^(w0 & G2), in_a, in_b);
      m1 = pm[p1] + bcost(^(w1 & G1), ^(w1 & G2), in_a, in_b);
      if (m1 < m0) begin
        npm[ns] = m1;
        nsv[ns] = {sv[p1][DEPTH-2:0], u};
      end else begin
        npm[ns] = m0;
        nsv[ns] = {sv[p0][DEPTH-2:0], u};
      end
    end
  end

  // best state after this step and the smallest metric
  logic [MW-1:0] minm;
  always_comb begin
    minm = npm[0];
    best = '0;
    for (int s = 1; s < NS; s++) begin
      if (npm[s] < minm) begin
        minm = npm[s];
        best = 6'(s);
      end
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int s = 0; s < NS; s++) begin
        pm[s] <= (s == 0) ? '0 : MW'(8 * SMAX);
        sv[s] <= '0;
      end
      seen      <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        for (int s = 0; s < NS; s++) begin
          pm[s] <= npm[s] - minm;
          sv[s] <= nsv[s];
        end
        if (seen < 16'(DEPTH - 1)) seen <= seen + 16'd1;
        else begin
          out_valid <= 1'b1;
          out_bit   <= nsv[best][DEPTH-1];
        end
      end
    end
  end
endmodule
