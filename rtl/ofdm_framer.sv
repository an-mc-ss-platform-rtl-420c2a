// OFDM framer: builds the 256 frequency-domain bins of each OFDM symbol, in
// FFT index order, for the inverse FFT. Bin 0 (DC) and the 44 edge bins are
// null; of the 211 used bins, 19 carry BPSK pilots of amplitude PILOT_AMP and
// 192 carry the spread data chips, taken from the input stream in index
// order. After `clear` the first symbol produced is a full-pilot symbol (all
// 211 used bins known BPSK) used by the receiver's least-squares channel
// estimator; every later symbol is a data symbol. One bin per cycle under
// valid/ready; a data bin waits for an input chip. The subcarrier counts are
// the modem's; the positions, pilot signs and frame order are this design's.
module ofdm_framer
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
  output logic                 out_first,   // bin 0 of a symbol
  output logic                 out_est      // bin belongs to the full-pilot symbol
);
  localparam logic [N_FFT-1:0] USED  = used_mask();
  localparam logic [N_FFT-1:0] PILOT = pilot_mask();
  localparam logic [N_FFT-1:0] SIGN  = sign_mask();

  logic [7:0] idx;
  logic       est;     // current symbol is the full-pilot symbol
  logic       known, data_bin;
  logic signed [DW-1:0] pv;

  assign known    = USED[idx] && (est || PILOT[idx]);
  assign data_bin = USED[idx] && !known;
  assign pv       = SIGN[idx] ? DW'(-PILOT_AMP) : DW'(PILOT_AMP);

  assign out_valid = data_bin ? in_valid : 1'b1;
  assign in_ready  = data_bin && out_ready;
  assign out_first = (idx == 8'd0);
  assign out_est   = est;

  always_comb begin
    if (data_bin) begin
      out_i = in_i;
      out_q = in_q;
    end else if (known) begin
      out_i = pv;
      out_q = '0;
    end else begin
      out_i = '0;
      out_q = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      idx <= '0;
      est <= 1'b1;
    end else if (out_valid && out_ready) begin
      idx <= idx + 8'd1;
      if (idx == 8'(N_FFT - 1)) est <= 1'b0;
    end
  end
endmodule
