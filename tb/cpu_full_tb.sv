// cpu_full_tb: the CPU at its default parameters (default program image,
// 100,000-cycle display refresh) runs the Fibonacci program for 150,000
// instructions, 450,000 clock cycles. That covers the value 55 on the
// display and a full scan of the four digits; every instruction is checked
// against the reference model, and every cycle the lit digit.
module cpu_full_tb;
  logic clk = 0, start = 0;
  always #5 clk = ~clk;

  logic done;
  int   checks, failures;
  int   cnt [16];

  logic        rst;
  logic [15:0] sw, led;
  logic [3:0]  an_n;
  logic [6:0]  seg_n;
  logic [7:0]  pc;
  cpu_pkg::state_e state;
  logic        halted;

  cpu u_dut (.clk, .rst, .sw, .an_n, .seg_n, .led, .pc, .state, .halted);

  cpu_prog_check #(.MAX_INSTR(150_000)) u_run
    (.clk, .start, .done, .checks, .failures, .counts(cnt),
     .rst, .sw, .an_n, .seg_n, .led, .pc, .state, .halted);

  initial begin
    repeat (1_600_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    int c, f;
    #1 start = 1;
    wait (done);
    c = checks; f = failures;
    c++; if (cnt[13] != 4) begin f++; $display("FAIL not all digits scanned"); end
    c++; if (cnt[14] == 0) begin f++; $display("FAIL 55 never displayed"); end
    $display("digits scanned %0d, instructions %0d", cnt[13], cnt[15]);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
