// Gray-coded QPSK / 16-QAM / 64-QAM mapper (combinational).
// `word` holds nbits = 2, 4 or 6 coded bits, right-aligned; the upper half
// selects the I level and the lower half the Q level. Each axis uses a Gray
// code on an odd-integer grid (-(2^k-1) .. +(2^k-1)) scaled by a per-mode
// unit: 1024 for QPSK, 448 for 16-QAM, 224 for 64-QAM, chosen so the sum of
// eight spread symbols stays within 16 bits. The labelling and amplitudes are
// this design's choice; the three modulations are the modem's.
module qam_mapper #(
  parameter int DW = 16
) (
  input  logic [2:0]          nbits,
  input  logic [5:0]          word,
  output logic signed [DW-1:0] sym_i,
  output logic signed [DW-1:0] sym_q
);
  function automatic logic signed [DW-1:0] axis(input logic [2:0] g, input int k, input int unit);
    logic [2:0] b;  // Gray to binary on the k used bits
    b = g;
    if (k == 3) begin
      b[1] = g[2] ^ g[1];
      b[0] = g[2] ^ g[1] ^ g[0];
    end else if (k == 2) begin
      b[0] = g[1] ^ g[0];
    end
    return DW'((2 * int'(b) - ((1 << k) - 1)) * unit);
  endfunction

  always_comb begin
    case (nbits)
      3'd2: begin
        sym_i = axis({2'b00, word[1]}, 1, 1024);
        sym_q = axis({2'b00, word[0]}, 1, 1024);
      end
      3'd4: begin
        sym_i = axis({1'b0, word[3:2]}, 2, 448);
        sym_q = axis({1'b0, word[1:0]}, 2, 448);
      end
      default: begin
        sym_i = axis(word[5:3], 3, 224);
        sym_q = axis(word[2:0], 3, 224);
      end
    endcase
  end
endmodule
