// Soft demapper for the Gray QPSK / 16-QAM / 64-QAM constellations of
// qam_mapper (combinational). For each coded bit it forms a piecewise-linear
// max-log metric per axis (y, 2U-|y|, 4U-|y|, 2U-||y|-4U|, U being the
// mode's amplitude unit), shifts it so one unit is about 3.5 steps and
// saturates it to SW-bit signed. A positive metric means the bit is likely 1.
// Soft bits come out in transmit order, in `llr`, entry
// nbits-1 first. The metric formulas and the width are this design's choice.
module soft_demapper #(
  parameter int DW = 16,
  parameter int SW = 4
) (
  input  logic [2:0]             nbits,
  input  logic signed [DW-1:0]   y_i,
  input  logic signed [DW-1:0]   y_q,
  output logic signed [SW-1:0]   llr [6]   // llr[nbits-1] is the first bit
);
  localparam int SMAX = (1 << (SW - 1)) - 1;

  function automatic logic signed [SW-1:0] sat(input int v, input int sh);
    int t;
    t = v >>> sh;
    if (t > SMAX) t = SMAX;
    if (t < -SMAX) t = -SMAX;
    return SW'(t);
  endfunction

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  int yi, yq;
  always_comb begin
    yi = int'(y_i);
    yq = int'(y_q);
    for (int k = 0; k < 6; k++) llr[k] = '0;
    case (nbits)
      3'd2: begin
        llr[1] = sat(yi, 8);
        llr[0] = sat(yq, 8);
      end
      3'd4: begin
        llr[3] = sat(yi, 7);
        llr[2] = sat(2 * 448 - iabs(yi), 7);
        llr[1] = sat(yq, 7);
        llr[0] = sat(2 * 448 - iabs(yq), 7);
      end
      default: begin
        llr[5] = sat(yi, 6);
        llr[4] = sat(4 * 224 - iabs(yi), 6);
        llr[3] = sat(2 * 224 - iabs(iabs(yi) - 4 * 224), 6);
        llr[2] = sat(yq, 6);
        llr[1] = sat(4 * 224 - iabs(yq), 6);
        llr[0] = sat(2 * 224 - iabs(iabs(yq) - 4 * 224), 6);
      end
    endcase
  end
endmodule
