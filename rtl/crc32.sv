// CRC-32 generator/checker for the MAC frame check sequence, one byte per
// cycle. IEEE 802 CRC-32: polynomial 0x04C11DB7 processed LSB first
// (reflected constant 0xEDB88320), register preset to all ones, result
// complemented. `init` presets the register; each cycle with `in_valid`
// folds in one byte. `crc` is the complemented register, i.e. the FCS of all
// bytes so far, to be sent least significant byte first. The use of CRC
// units in the MAC hardware is from the modem's MAC; the polynomial is the
// one IEEE 802 frames use.
module crc32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        in_valid,
  input  logic [7:0]  in_byte,
  output logic [31:0] crc
);
  logic [31:0] r, nr;

  always_comb begin
    nr = r;
    for (int b = 0; b < 8; b++) begin
      if (nr[0] ^ in_byte[b]) nr = (nr >> 1) ^ 32'hEDB88320;
      else                    nr = nr >> 1;
    end
  end

  assign crc = ~r;

  always_ff @(posedge clk) begin
    if (!rst_n || init) r <= '1;
    else if (in_valid)  r <= nr;
  end
endmodule
