// dec247_tb: self-check of the BCD to 7-segment decoder. The expected
// displays are written as the lit segment letters of each glyph, then
// lamp test and blanking are checked.
module dec247_tb;

  logic [3:0] bcd;
  logic       lt_n, bi_n;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;

  dec247 dut (.*);

  // Lit segments of each code, as letters a..g.
  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                        "acdefg", "abc", "abcdefg", "abcdfg", "deg", "cdg",
                        "bfg", "adfg", "defg", ""};

  function automatic logic [6:0] lit_n(string s);
    logic [6:0] v = 7'h7f;
    for (int i = 0; i < s.len(); i++) v[3'(s[i] - "a")] = 1'b0;
    return v;
  endfunction

  task automatic expect_seg(string what, logic [6:0] exp);
    checks++;
    if (seg_n !== exp) begin
      failures++;
      $display("FAIL %s bcd=%0d seg_n=%b expected %b", what, bcd, seg_n, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lt_n = 1; bi_n = 1;
    for (int i = 0; i < 16; i++) begin
      bcd = 4'(i); #1; expect_seg("glyph", lit_n(glyph[i]));
    end
    lt_n = 0;
    for (int i = 0; i < 16; i++) begin
      bcd = 4'(i); #1; expect_seg("lamp test", 7'h00);
    end
    bi_n = 0;
    for (int i = 0; i < 16; i++) begin
      bcd = 4'(i); #1; expect_seg("blank", 7'h7f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
