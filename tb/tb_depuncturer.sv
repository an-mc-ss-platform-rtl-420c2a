// Testbench for depuncturer: random words of 2, 4 or 6 soft values (entry
// nbits-1 goes first) for each code rate, random stalls on both sides. The
// serial soft stream s0 s1 s2 ... must come out as pairs
// 1/2: (s0,s1); 2/3: (s0,s1)(s2,0); 3/4: (s0,s1)(s2,0)(0,s3), repeating.
module tb_depuncturer;
  import mhdr_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_ready = 0;
  rate_e rate = R_12;
  logic [2:0] nbits = 3'd2;
  logic in_ready, out_valid;
  logic signed [3:0] in_soft [6], out_a, out_b;
  int checks = 0, failures = 0;
  int ser [$], exp_a [$], exp_b [$];

  depuncturer #(.SW(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_a.size() == 0 || int'(out_a) != exp_a[0] || int'(out_b) != exp_b[0]) begin
        failures++; $display("FAIL rate %0d got (%0d,%0d) want (%0d,%0d)", rate, out_a, out_b, exp_a[0], exp_b[0]);
      end
      if (exp_a.size() != 0) begin void'(exp_a.pop_front()); void'(exp_b.pop_front()); end
    end
  end

  // builds the expected pairs from the serial soft stream
  function automatic void expect_pairs(input rate_e r);
    int k = 0;
    while (k < ser.size()) begin
      case (r)
        R_12: begin exp_a.push_back(ser[k]); exp_b.push_back(ser[k+1]); k += 2; end
        R_23: begin
          exp_a.push_back(ser[k]); exp_b.push_back(ser[k+1]);
          exp_a.push_back(ser[k+2]); exp_b.push_back(0); k += 3;
        end
        default: begin
          exp_a.push_back(ser[k]); exp_b.push_back(ser[k+1]);
          exp_a.push_back(ser[k+2]); exp_b.push_back(0);
          exp_a.push_back(0); exp_b.push_back(ser[k+3]); k += 4;
        end
      endcase
    end
  endfunction

  task automatic run(input rate_e r, input int nb);
    int nwords;
    @(negedge clk);
    rate = r; nbits = 3'(nb);
    clear = 1;
    @(negedge clk);
    clear = 0;
    ser.delete();
    nwords = 24;   // 24 * nb values: a whole number of puncturing periods
    for (int k = 0; k < nwords * nb; k++) begin
      int v = $signed($urandom_range(0, 13)) - 7;
      ser.push_back(v >= 0 ? v + 1 : v);      // -7..7 without 0
    end
    expect_pairs(r);
    for (int w = 0; w < nwords; w++) begin
      for (int j = 0; j < nb; j++) in_soft[nb-1-j] = 4'(ser[w*nb+j]);
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    repeat (60) @(negedge clk);
    checks++;
    if (exp_a.size() != 0) begin failures++; $display("FAIL rate %0d nbits %0d: %0d pairs missing", r, nb, exp_a.size()); end
    exp_a.delete(); exp_b.delete();
  endtask

  initial begin
    for (int k = 0; k < 6; k++) in_soft[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int nb = 2; nb <= 6; nb += 2) begin
      run(R_12, nb);
      run(R_23, nb);
      run(R_34, nb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
