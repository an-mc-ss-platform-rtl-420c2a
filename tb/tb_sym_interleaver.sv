// Testbench for sym_interleaver: three OFDM symbols of 192 random words go
// through the interleaver and then through a second instance with
// INVERSE = 1. The interleaver output must follow the 16 x 12 block rule
// (output k = input (k mod 16) * 12 + k / 16) and the de-interleaver must
// restore the original order. Output stalls are random.
module tb_sym_interleaver;
  localparam int NW = 192;
  logic clk = 0, rst_n = 0;
  logic a_valid = 0, a_ready, b_valid, b_ready, c_valid, c_ready = 0;
  logic [5:0] a_word = 0, b_word, c_word;
  int checks = 0, failures = 0;
  logic [5:0] sent [3*NW];
  int nb = 0, nc = 0;

  sym_interleaver #(.W(6), .NWORDS(NW), .ROWS(16), .INVERSE(1'b0)) u_il (.clk, .rst_n, .clear(1'b0),
    .in_valid(a_valid), .in_ready(a_ready), .in_word(a_word), .out_valid(b_valid), .out_ready(b_ready), .out_word(b_word));
  sym_interleaver #(.W(6), .NWORDS(NW), .ROWS(16), .INVERSE(1'b1)) u_dil (.clk, .rst_n, .clear(1'b0),
    .in_valid(b_valid), .in_ready(b_ready), .in_word(b_word), .out_valid(c_valid), .out_ready(c_ready), .out_word(c_word));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) c_ready = ($urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    if (rst_n && b_valid && b_ready) begin
      int s, k;
      s = nb / NW; k = nb % NW;
      checks++;
      if (b_word !== sent[s * NW + (k % 16) * 12 + k / 16]) begin
        failures++; $display("FAIL interleaved word %0d", nb);
      end
      nb++;
    end
    if (rst_n && c_valid && c_ready) begin
      checks++;
      if (c_word !== sent[nc]) begin failures++; $display("FAIL deinterleaved word %0d", nc); end
      nc++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3 * NW; i++) begin
      sent[i] = 6'($urandom);
      a_valid = 1; a_word = sent[i];
      @(posedge clk);
      while (!a_ready) @(posedge clk);
      @(negedge clk);
      a_valid = 0;
    end
    repeat (2000) @(negedge clk);
    checks++;
    if (nc != 3 * NW) begin failures++; $display("FAIL only %0d words came back", nc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
