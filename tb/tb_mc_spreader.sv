// Testbench for mc_spreader: 40 groups of 8 random symbols; each group of 8
// chips must equal H8 * s, H8 being the Sylvester-Hadamard matrix built here
// by the recursion H2n = [Hn Hn; Hn -Hn]. Random output stalls.
module tb_mc_spreader;
  localparam int SF = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, out_ready = 0;
  logic in_ready, out_valid;
  logic signed [15:0] in_i = 0, in_q = 0, out_i, out_q;
  int checks = 0, failures = 0;
  int H [SF][SF];
  int exp_i [$], exp_q [$];

  mc_spreader #(.DW(16), .SF(SF)) dut (.clk, .rst_n, .clear(1'b0), .in_valid, .in_ready, .in_i, .in_q,
                                       .out_valid, .out_ready, .out_i, .out_q);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_i.size() == 0 || int'(out_i) != exp_i[0] || int'(out_q) != exp_q[0]) begin
        failures++;
        $display("FAIL chip %0d %0d", out_i, out_q);
      end
      if (exp_i.size() != 0) begin void'(exp_i.pop_front()); void'(exp_q.pop_front()); end
    end
  end

  initial begin
    int si [SF], sq [SF], ci, cq;
    H[0][0] = 1;
    for (int n = 1; n < SF; n *= 2)
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          H[r][c+n] = H[r][c];
          H[r+n][c] = H[r][c];
          H[r+n][c+n] = -H[r][c];
        end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 40; g++) begin
      for (int k = 0; k < SF; k++) begin
        si[k] = $signed($urandom_range(0, 3584)) - 1792;
        sq[k] = $signed($urandom_range(0, 3584)) - 1792;
      end
      for (int c = 0; c < SF; c++) begin
        ci = 0; cq = 0;
        for (int k = 0; k < SF; k++) begin ci += H[c][k] * si[k]; cq += H[c][k] * sq[k]; end
        exp_i.push_back(ci); exp_q.push_back(cq);
      end
      for (int k = 0; k < SF; k++) begin
        in_valid = 1; in_i = 16'(si[k]); in_q = 16'(sq[k]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
      end
    end
    repeat (50) @(negedge clk);
    checks++;
    if (exp_i.size() != 0) begin failures++; $display("FAIL %0d chips missing", exp_i.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
