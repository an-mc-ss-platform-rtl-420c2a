// AES-128 block encryption core (FIPS-197), used by the MAC hardware for
// payload ciphering. A 128-bit block and key are loaded with `start`; the
// initial AddRoundKey is applied at load, then one full round per cycle
// (SubBytes, ShiftRows, MixColumns except in round 10, AddRoundKey) with the
// round key expanded on the fly, so `done` pulses 10 cycles after `start`
// with the ciphertext in `block_out`. The S-box is computed, not stored: the
// multiplicative inverse in GF(2^8) (as x^254) followed by the affine map.
// Bytes are numbered from the most significant end (byte 0 = bits 127:120),
// column-major as in FIPS-197. A 128-bit AES unit is the modem's; the
// iterative structure is this design's choice.
module aes128_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] block_in,
  output logic         busy,
  output logic         done,
  output logic [127:0] block_out
);
  function automatic logic [7:0] xt(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xt(x);
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] inv, a2, a4, a8, a16, a32, a64, a128, s;
    // a^254 = a^128 a^64 a^32 a^16 a^8 a^4 a^2
    a2   = gmul(a, a);
    a4   = gmul(a2, a2);
    a8   = gmul(a4, a4);
    a16  = gmul(a8, a8);
    a32  = gmul(a16, a16);
    a64  = gmul(a32, a32);
    a128 = gmul(a64, a64);
    inv  = gmul(gmul(gmul(a128, a64), gmul(a32, a16)), gmul(gmul(a8, a4), a2));
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8];
    return s ^ 8'h63;
  endfunction

  function automatic logic [7:0] byte_of(input logic [127:0] v, input int i);
    return v[127 - 8 * i -: 8];
  endfunction

  logic [127:0] st, rk;
  logic [3:0]   round;
  logic [7:0]   rcon;

  // next round key
  logic [127:0] nrk;
  always_comb begin
    logic [31:0] w0, w1, w2, w3, t;
    w0 = rk[127:96]; w1 = rk[95:64]; w2 = rk[63:32]; w3 = rk[31:0];
    t  = {sbox(w3[23:16]) ^ rcon, sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    nrk = {w0, w1, w2, w3};
  end

  // one round on the state
  logic [127:0] nst;
  always_comb begin
    logic [7:0] sb [16];
    logic [7:0] sr [16];
    logic [7:0] mc [16];
    for (int i = 0; i < 16; i++) sb[i] = sbox(byte_of(st, i));
    // ShiftRows: row r of column c takes column (c + r) mod 4
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[4 * c + r] = sb[4 * ((c + r) % 4) + r];
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a0, a1, a2, a3;
      a0 = sr[4*c]; a1 = sr[4*c+1]; a2 = sr[4*c+2]; a3 = sr[4*c+3];
      mc[4*c]   = xt(a0) ^ (xt(a1) ^ a1) ^ a2 ^ a3;
      mc[4*c+1] = a0 ^ xt(a1) ^ (xt(a2) ^ a2) ^ a3;
      mc[4*c+2] = a0 ^ a1 ^ xt(a2) ^ (xt(a3) ^ a3);
      mc[4*c+3] = (xt(a0) ^ a0) ^ a1 ^ a2 ^ xt(a3);
    end
    for (int i = 0; i < 16; i++)
      nst[127 - 8 * i -: 8] = ((round == 4'd10) ? sr[i] : mc[i]) ^ byte_of(nrk, i);
  end

  assign busy      = (round != 4'd0);
  assign block_out = st;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      round <= '0;
      done  <= 1'b0;
      st    <= '0;
      rk    <= '0;
      rcon  <= 8'h01;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        st    <= block_in ^ key;
        rk    <= key;
        rcon  <= 8'h01;
        round <= 4'd1;
      end else if (busy) begin
        st   <= nst;
        rk   <= nrk;
        rcon <= xt(rcon);
        if (round == 4'd10) begin
          round <= '0;
          done  <= 1'b1;
        end else round <= round + 4'd1;
      end
    end
  end
endmodule
