// Rate-1/2 convolutional encoder, constraint length 7, generator polynomials
// 133 and 171 (octal), as specified for the MC-SS air interface.
// Each accepted input bit produces one pair {a, b}: a from G1 = 133, b from
// G2 = 171; a is the first bit after serialisation. The encoder is
// combinational from input to output (no extra latency); the 6-bit shift
// register advances on every accepted bit. `clear` returns the register to the
// all-zero state at the start of a frame. Valid/ready handshake on both sides;
// the caller appends the six zero tail bits.
module conv_encoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_bit,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [1:0] out_pair   // [1] = G1 (133) bit, [0] = G2 (171) bit
);
  localparam logic [6:0] G1 = 7'o133;
  localparam logic [6:0] G2 = 7'o171;

  logic [5:0] sr;  // sr[5] is the most recent past bit, sr[0] the oldest
  logic [6:0] win;

  assign win       = {in_bit, sr};          // win[6] = current bit
  assign out_valid = in_valid;
  assign in_ready  = out_ready;
  assign out_pair  = {^(win & G1), ^(win & G2)};

  always_ff @(posedge clk) begin
    if (!rst_n || clear) sr <= '0;
    else if (in_valid && out_ready) sr <= {in_bit, sr[5:1]};
  end
endmodule
