// Testbench for viterbi_decoder. Frames of random bits plus 6 zero tail and
// 40 zero padding bits are encoded here with the K = 7 (133, 171) code and
// turned into 4-bit soft values (+-7). Cases: clean; puncturing erasures
// as left by the de-puncturer at rate 3/4; isolated hard errors (a sign
// flipped every 25 pairs, well inside the code's correcting power); and
// random noise on all metrics. Each frame's first data+tail bits must be
// decoded without error, and exactly (pairs - 39) bits must come out.
module tb_viterbi_decoder;
  localparam int DEPTH = 40;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_ready = 0;
  logic in_ready, out_valid, out_bit;
  logic signed [3:0] in_a = 0, in_b = 0;
  int checks = 0, failures = 0;
  logic got [$];

  viterbi_decoder #(.SW(4), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n && !clear && out_valid && out_ready) got.push_back(out_bit);

  function automatic int clip(input int v);
    return v > 7 ? 7 : v < -7 ? -7 : v;
  endfunction

  // kind: 0 clean, 1 rate-3/4 erasures, 2 isolated errors, 3 noise
  task automatic frame(input int nbits, input int kind);
    logic data [$];
    logic [6:0] u;
    int pairs, errs = 0, sa, sb;
    for (int k = 0; k < nbits; k++) data.push_back(1'($urandom_range(0, 1)));
    for (int k = 0; k < 6 + DEPTH; k++) data.push_back(1'b0);
    pairs = data.size();
    got.delete();
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    u = '0;
    for (int k = 0; k < pairs; k++) begin
      u = {data[k], u[6:1]};
      sa = (^(u & 7'b1011011)) ? 7 : -7;   // 133 octal, newest bit at the MSB
      sb = (^(u & 7'b1111001)) ? 7 : -7;   // 171 octal
      case (kind)
        1: begin if (k % 3 == 1) sb = 0; if (k % 3 == 2) sa = 0; end
        2: if (k % 25 == 12) sa = -sa;
        3: begin
          sa = clip(sa + $signed($urandom_range(0, 12)) - 6 + $signed($urandom_range(0, 6)) - 3);
          sb = clip(sb + $signed($urandom_range(0, 12)) - 6 + $signed($urandom_range(0, 6)) - 3);
        end
        default: ;
      endcase
      in_valid = 1; in_a = 4'(sa); in_b = 4'(sb);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (20) @(negedge clk);
    checks++;
    if (got.size() != pairs - (DEPTH - 1)) begin
      failures++; $display("FAIL kind %0d: %0d bits out for %0d pairs", kind, got.size(), pairs);
    end
    for (int k = 0; k < nbits + 6 && k < got.size(); k++) if (got[k] != data[k]) errs++;
    checks++;
    if (errs != 0) begin failures++; $display("FAIL kind %0d: %0d bit errors", kind, errs); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // data lengths are multiples of 3 so that the 3/4 erasure pattern lines up
    for (int t = 0; t < 3; t++) frame(300, 0);
    for (int t = 0; t < 3; t++) frame(300, 1);
    for (int t = 0; t < 3; t++) frame(300, 2);
    for (int t = 0; t < 3; t++) frame(600, 3);
    frame(3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
