// Least-squares channel estimator and zero-forcing equaliser.
// After `clear` the first 256-bin symbol from the FFT is the full-pilot
// symbol, whose used bins carry the known values X = +-PILOT_AMP. For each
// bin the estimator stores the zero-forcing coefficient
//   W = 1/H = X / Y = X * conj(Y) / |Y|^2,
// quantised to CW = 12 bits signed with CFRAC fraction bits (null bins get
// W = 0). Every later symbol is equalised bin by bin, Z = (Y * W) >> CFRAC,
// and passed on in FFT order with out_first on bin 0. One bin per cycle,
// valid/ready; no output is produced for the pilot symbol. The LS estimate
// over a full pilot symbol, zero forcing and 12-bit coefficients are the
// modem's; the combinational divider and the Q2.9 format are this design's.
module chan_est_eq
  import mhdr_pkg::*;
#(
  parameter int DW    = 20,
  parameter int CW    = 12,
  parameter int CFRAC = 9
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
  output logic                 out_first,
  output logic                 est_done
);
  localparam logic [N_FFT-1:0] USED = used_mask();
  localparam logic [N_FFT-1:0] SIGN = sign_mask();
  localparam longint CMAX = (1 << (CW - 1)) - 1;

  logic signed [CW-1:0] wr [N_FFT];
  logic signed [CW-1:0] wi [N_FFT];
  logic [7:0] idx;
  logic       est;

  function automatic logic signed [CW-1:0] csat(input longint v);
    if (v > CMAX)  return CW'(CMAX);
    if (v < -CMAX) return CW'(-CMAX);
    return CW'(v);
  endfunction

  // coefficient of the current bin from the pilot symbol
  logic signed [CW-1:0] nwr, nwi;
  always_comb begin
    longint yr, yi, x, den;
    yr  = longint'(in_i);
    yi  = longint'(in_q);
    x   = SIGN[idx] ? -longint'(PILOT_AMP) : longint'(PILOT_AMP);
    den = yr * yr + yi * yi;
    if (!USED[idx] || den == 0) begin
      nwr = '0;
      nwi = '0;
    end else begin
      nwr = csat(((x * yr) <<< CFRAC) / den);
      nwi = csat(((-x * yi) <<< CFRAC) / den);
    end
  end

  // equalised bin
  always_comb begin
    longint pr, pq;
    pr = longint'(in_i) * longint'(wr[idx]) - longint'(in_q) * longint'(wi[idx]);
    pq = longint'(in_i) * longint'(wi[idx]) + longint'(in_q) * longint'(wr[idx]);
    out_i = DW'(pr >>> CFRAC);
    out_q = DW'(pq >>> CFRAC);
  end

  assign in_ready  = est ? 1'b1 : out_ready;
  assign out_valid = in_valid && !est;
  assign out_first = (idx == 8'd0);
  assign est_done  = !est;

  always_ff @(posedge clk) begin
    if (est && in_valid) begin
      wr[idx] <= nwr;
      wi[idx] <= nwi;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      idx <= '0;
      est <= 1'b1;
    end else if (in_valid && in_ready) begin
      idx <= idx + 8'd1;
      if (idx == 8'(N_FFT - 1)) est <= 1'b0;
    end
  end
endmodule
