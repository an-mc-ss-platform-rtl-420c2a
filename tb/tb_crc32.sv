// Testbench for crc32: published check values of the IEEE 802 CRC-32
// ("123456789" -> CBF43926, "a" -> E8B7BE43, the "quick brown fox"
// sentence -> 414FA339, empty -> 0), random messages against a
// bit-serial model written here with the non-reflected polynomial 04C11DB7
// (bits reversed at input and output), and the receiver property that a
// message followed by its FCS (least significant byte first) always yields
// the constant output 2144DF1C (register residue DEBB20E3).
module tb_crc32;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0;
  logic [7:0] in_byte = 0;
  logic [31:0] crc;
  int checks = 0, failures = 0;

  crc32 dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_crc(input logic [7:0] m [$]);
    logic [31:0] r = '1, o;
    foreach (m[i])
      for (int b = 0; b < 8; b++) begin         // LSB of each byte first
        logic top = r[31] ^ m[i][b];
        r = {r[30:0], 1'b0};
        if (top) r ^= 32'h04C11DB7;
      end
    for (int b = 0; b < 32; b++) o[b] = r[31-b];
    return ~o;
  endfunction

  task automatic feed(input logic [7:0] m [$]);
    @(negedge clk);
    init = 1;
    @(negedge clk);
    init = 0;
    foreach (m[i]) begin
      in_valid = 1; in_byte = m[i];
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
  endtask

  task automatic chk(input logic [31:0] want, input string s);
    checks++;
    if (crc !== want) begin failures++; $display("FAIL %s: got %h want %h", s, crc, want); end
  endtask

  function automatic void str2q(input string s, ref logic [7:0] q [$]);
    q.delete();
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
  endfunction

  initial begin
    logic [7:0] m [$];
    logic [31:0] f;
    repeat (3) @(negedge clk);
    rst_n = 1;
    str2q("123456789", m); feed(m); chk(32'hCBF43926, "check string");
    str2q("a", m);         feed(m); chk(32'hE8B7BE43, "a");
    str2q("The quick brown fox jumps over the lazy dog", m); feed(m); chk(32'h414FA339, "fox");
    m.delete();            feed(m); chk(32'h00000000, "empty");
    for (int t = 0; t < 40; t++) begin
      m.delete();
      for (int i = 0, n = $urandom_range(1, 300); i < n; i++) m.push_back(8'($urandom));
      feed(m);
      f = ref_crc(m);
      chk(f, "random message");
      for (int b = 0; b < 4; b++) m.push_back(f[8*b +: 8]);
      feed(m);
      chk(32'h2144DF1C, "message + FCS residue");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
