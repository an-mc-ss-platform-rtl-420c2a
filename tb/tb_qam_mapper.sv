// Testbench for qam_mapper: every word of every modulation is compared with
// a written-out Gray table (QPSK 0 -> -1024, 1 -> +1024; 16-QAM 00,01,11,10
// -> -3,-1,1,3 x 448; 64-QAM 000,001,011,010,110,111,101,100 -> -7..7 x 224).
module tb_qam_mapper;
  logic [2:0] nbits;
  logic [5:0] word;
  logic signed [15:0] sym_i, sym_q;
  int checks = 0, failures = 0;

  qam_mapper #(.DW(16)) dut (.*);

  int lv16 [4] = '{-3, -1, 3, 1};                    // index = gray code value
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
    foreach (lv16[i]) ;
    for (int nb = 2; nb <= 6; nb += 2) begin
      for (int w = 0; w < (1 << nb); w++) begin
        nbits = 3'(nb);
        word  = 6'(w);
        #1;
        checks++;
        if (int'(sym_i) != lvl(nb, w >> (nb / 2)) || int'(sym_q) != lvl(nb, w & ((1 << (nb / 2)) - 1))) begin
          failures++;
          $display("FAIL nbits %0d word %b -> %0d %0d", nb, w, sym_i, sym_q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
