// bin_to_bcd_tb: compares the converter's decimal digits with digits
// computed by repeated division, for edge values and random 32-bit inputs.
module bin_to_bcd_tb;
  logic [31:0] bin;
  logic [39:0] bcd;
  int checks = 0, failures = 0;

  bin_to_bcd dut (.bin, .bcd);

  function automatic logic [39:0] ref_bcd(input logic [31:0] v);
    logic [39:0] r;
    longint unsigned x;
    x = v;
    for (int d = 0; d < 10; d++) begin
      r[4*d +: 4] = 4'(x % 10);
      x = x / 10;
    end
    return r;
  endfunction

  task automatic check(input logic [31:0] v);
    bin = v; #1;
    checks++;
    if (bcd !== ref_bcd(v)) begin
      failures++;
      $display("FAIL %0d: got %h exp %h", v, bcd, ref_bcd(v));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(5); check(9); check(10); check(55); check(99); check(100);
    check(9999); check(10000); check(32'd4294967295); check(32'd1000000000);
    repeat (3000) check($urandom);
    repeat (1000) check($urandom % 10000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
