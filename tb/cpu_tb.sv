// cpu_tb: end-to-end test of the whole CPU on the three example programs:
// Fibonacci (default image, 400 instructions, well past the value 55), the
// countdown from 5 to 0 ending in END, and the switch calculator that adds
// and compares two switch readings. Each runs on its own cpu instance with
// a short display refresh period and is checked instruction by instruction
// against the reference model. Every mechanism of the design must occur:
// each opcode, a taken and a not-taken branch, each ALU operation, the halt,
// the display scan over all four digits, and 55 on the display.
module cpu_tb;
  logic clk = 0, start = 0;
  always #5 clk = ~clk;

  logic done [3];
  int   chk [3], fail [3];
  int   cnt [3][16];

  localparam string IMAGES [3] = '{"rtl/fibonacci.mem", "tb/countdown.mem", "tb/switch_add.mem"};

  for (genvar p = 0; p < 3; p++) begin : g_prog
    logic        rst;
    logic [15:0] sw, led;
    logic [3:0]  an_n;
    logic [6:0]  seg_n;
    logic [7:0]  pc;
    cpu_pkg::state_e state;
    logic        halted;

    cpu #(.PROGRAM(IMAGES[p]), .REFRESH_DIV(5)) u_dut
      (.clk, .rst, .sw, .an_n, .seg_n, .led, .pc, .state, .halted);

    cpu_prog_check #(.PROGRAM(IMAGES[p]), .MAX_INSTR(400)) u_chk
      (.clk, .start, .done(done[p]), .checks(chk[p]), .failures(fail[p]), .counts(cnt[p]),
       .rst, .sw, .an_n, .seg_n, .led, .pc, .state, .halted);
  end

  int checks, failures;
  string names [16] = '{"mov", "load", "alu", "save_alu", "load_input", "branch taken",
                        "branch not taken", "end", "unused opcode", "alu add", "alu sub",
                        "alu eq", "digit lit cycles", "digits scanned", "55 displayed", "retired"};

  task automatic need(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    int total [16];
    checks = 0; failures = 0;
    #1 start = 1;
    wait (done[0] && done[1] && done[2]);
    foreach (total[k]) total[k] = cnt[0][k] + cnt[1][k] + cnt[2][k];
    for (int k = 0; k < 16; k++) $display("  %-18s %0d", names[k], total[k]);
    for (int k = 0; k < 15; k++) need(total[k] > 0, {"mechanism never happened: ", names[k]});
    need(cnt[0][13] == 4, "fibonacci run scanned all four digits");
    need(cnt[0][14] > 0, "fibonacci showed 55");
    need(cnt[1][7] == 1 && cnt[1][15] == 31, "countdown ends after 31 instructions");
    need(cnt[2][7] == 1, "switch program ends");
    for (int p = 0; p < 3; p++) begin checks += chk[p]; failures += fail[p]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
