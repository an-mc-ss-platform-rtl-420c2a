// Testbench for soft_demapper: for every constellation point of QPSK,
// 16-QAM and 64-QAM (taken from a written-out Gray table) plus noise of up
// to a third of the level spacing, the sign of every soft bit must give back
// the transmitted bit; a zero input must give zero (erasure) metrics for
// the sign bits, and large inputs must saturate at +-7.
module tb_soft_demapper;
  logic [2:0] nbits;
  logic signed [19:0] y_i, y_q;
  logic signed [3:0] llr [6];
  int checks = 0, failures = 0;

  soft_demapper #(.DW(20), .SW(4)) dut (.*);

  int lv16 [4] = '{-3, -1, 3, 1};
  int lv64 [8] = '{-7, -5, -1, -3, 7, 5, 1, 3};

  function automatic int lvl(input int nb, input int g);
    case (nb)
      2: return g ? 1024 : -1024;
      4: return lv16[g] * 448;
      default: return lv64[g] * 224;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unit, h;
    for (int nb = 2; nb <= 6; nb += 2) begin
      unit = (nb == 2) ? 1024 : (nb == 4) ? 448 : 224;
      h = nb / 2;
      for (int rep = 0; rep < 20; rep++) begin
        for (int w = 0; w < (1 << nb); w++) begin
          nbits = 3'(nb);
          y_i = 20'(lvl(nb, w >> h) + $signed($urandom_range(0, 2 * unit / 3)) - unit / 3);
          y_q = 20'(lvl(nb, w & ((1 << h) - 1)) + $signed($urandom_range(0, 2 * unit / 3)) - unit / 3);
          #1;
          for (int b = 0; b < nb; b++) begin
            checks++;
            if ((llr[b] > 0) != w[b] || llr[b] == 0) begin
              failures++;
              $display("FAIL nbits %0d word %b bit %0d llr %0d (y %0d %0d)", nb, w, b, llr[b], y_i, y_q);
            end
          end
        end
      end
    end
    nbits = 2; y_i = 0; y_q = 0; #1;
    checks++;
    if (llr[1] != 0 || llr[0] != 0) begin failures++; $display("FAIL zero input"); end
    nbits = 6; y_i = 20000; y_q = -20000; #1;
    checks++;
    if (llr[5] != 7 || llr[2] != -7) begin failures++; $display("FAIL saturation %0d %0d", llr[5], llr[2]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
