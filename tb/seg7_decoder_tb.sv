// seg7_decoder_tb: checks all 16 input codes against the segment patterns
// of the ten decimal digits (listed here as the segment letters lit) and
// blanking for codes 10 to 15.
module seg7_decoder_tb;
  logic [3:0] bcd;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                      "acdefg", "abc", "abcdefg", "abcdfg"};

  seg7_decoder dut (.bcd, .seg_n);

  function automatic logic [6:0] pattern(input string s);
    logic [6:0] p;
    p = '0;
    for (int k = 0; k < s.len(); k++) p[s[k] - "a"] = 1'b1;
    return ~p;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [6:0] exp;
      bcd = 4'(v); #1;
      exp = (v < 10) ? pattern(lit[v]) : 7'h7F;
      checks++;
      if (seg_n !== exp) begin
        failures++;
        $display("FAIL code %0d: got %b exp %b", v, seg_n, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
