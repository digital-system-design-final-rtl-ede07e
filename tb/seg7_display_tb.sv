// seg7_display_tb: with a short refresh period, checks that exactly one
// digit is lit at a time, that each digit stays lit for REFRESH_DIV cycles,
// that the scan visits the digits in order, and that the lit digit shows
// the right decimal digit of the value (the photographed 55 and random
// values).
module seg7_display_tb;
  localparam int DIV = 7;
  logic        clk = 0, rst;
  logic [31:0] value;
  logic [3:0]  an_n;
  logic [6:0]  seg_n;
  int checks = 0, failures = 0;
  logic [6:0] pat [10];

  seg7_display #(.NUM_DIGITS(4), .REFRESH_DIV(DIV)) dut (.clk, .rst, .value, .an_n, .seg_n);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  function automatic int digit_of(input logic [31:0] v, input int d);
    longint unsigned x;
    x = v;
    repeat (d) x = x / 10;
    return int'(x % 10);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // active-low patterns {g..a}
    pat[0] = ~7'b0111111; pat[1] = ~7'b0000110; pat[2] = ~7'b1011011; pat[3] = ~7'b1001111;
    pat[4] = ~7'b1100110; pat[5] = ~7'b1101101; pat[6] = ~7'b1111101; pat[7] = ~7'b0000111;
    pat[8] = ~7'b1111111; pat[9] = ~7'b1101111;
    rst = 1; value = 32'd55;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 60; t++) begin
      int d;
      if (t > 0 && t % 4 == 0) begin
        value = (t % 8 == 0) ? 32'(55) : $urandom;
        #1;
      end
      d = t % 4;
      for (int c = 0; c < DIV; c++) begin
        check(32'(an_n), {28'd0, ~(4'b1 << d)}, "anode select");
        check(32'(seg_n), 32'(pat[digit_of(value, d)]), "segments");
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
