// OFDM deframer: from the 256 equalised bins of a data symbol, in FFT index
// order, it keeps the 192 data bins and drops DC, guard and pilot bins, so
// the chips come out in the order the framer took them. Bins carry
// valid/ready; a dropped bin is consumed without output. The bin counter
// restarts on in_first. The subcarrier map is shared with ofdm_framer.
module ofdm_deframer
  import mhdr_pkg::*;
#(
  parameter int DW = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  input  logic                 in_first,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_i,
  output logic signed [DW-1:0] out_q
);
  localparam logic [N_FFT-1:0] DATA = used_mask() & ~pilot_mask();

  logic [7:0] cnt, idx;
  assign idx       = in_first ? 8'd0 : cnt;
  assign out_valid = in_valid && DATA[idx];
  assign in_ready  = DATA[idx] ? out_ready : 1'b1;
  assign out_i     = in_i;
  assign out_q     = in_q;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else if (in_valid && in_ready) cnt <= idx + 8'd1;
  end
endmodule
