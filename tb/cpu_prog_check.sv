// cpu_prog_check: drives one cpu instance running a program image and checks it,
// instruction by instruction, against the reference model (cpu_ref_pkg):
// program counter, halt flag, LEDs (register 15), three cycles per
// instruction, and on every cycle the segments of the lit display digit
// against the decimal digit of the displayed value. Switches change to a
// new random value after every instruction. It stops after MAX_INSTR
// instructions or after END, and reports counts of what it saw:
//   counts[0..8]  instruction kinds (see ref_step)
//   counts[9..11] ALU add / sub / equality instructions
//   counts[12]    cycles spent with each digit lit, summed over digits 0..3
//   counts[13]    digits that were lit at least once (0..4)
//   counts[14]    value 55 shown on the display
//   counts[15]    instructions retired
module cpu_prog_check #(
  parameter string       PROGRAM   = "rtl/fibonacci.mem",
  parameter int unsigned MAX_INSTR = 1000
) (
  input  logic               clk,
  input  logic               start,
  output logic               done,
  output int                 checks,
  output int                 failures,
  output int                 counts [16],
  // connections to the cpu under test
  output logic               rst,
  output logic [15:0]        sw,
  input  logic [3:0]         an_n,
  input  logic [6:0]         seg_n,
  input  logic [15:0]        led,
  input  logic [7:0]         pc,
  input  cpu_pkg::state_e    state,
  input  logic               halted
);
  import cpu_pkg::*;
  import cpu_ref_pkg::*;

  logic [15:0] image [256];
  logic [6:0]  pat [10];
  logic [3:0]  digits_seen;
  ref_state_t  s;

  function automatic int digit_of(input logic [31:0] v, input int d);
    longint unsigned x;
    x = v;
    repeat (d) x = x / 10;
    return int'(x % 10);
  endfunction

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s %s: got %h exp %h (instr %0d)", PROGRAM, what, got, exp, s.retired);
    end
  endtask

  initial begin
    pat[0] = ~7'b0111111; pat[1] = ~7'b0000110; pat[2] = ~7'b1011011; pat[3] = ~7'b1001111;
    pat[4] = ~7'b1100110; pat[5] = ~7'b1101101; pat[6] = ~7'b1111101; pat[7] = ~7'b0000111;
    pat[8] = ~7'b1111111; pat[9] = ~7'b1101111;
    foreach (image[k]) image[k] = '0;
    $readmemh(PROGRAM, image);
    checks = 0; failures = 0; done = 0; digits_seen = '0;
    foreach (counts[k]) counts[k] = 0;
    rst = 1; sw = 16'($urandom);
    wait (start);
    @(posedge clk); @(posedge clk); #1 rst = 0;
    ref_reset(s);
    begin
      int cyc;
      int lit;
      logic [15:0] cur;
      cyc = 0;
      while (s.retired < MAX_INSTR && !s.halted) begin
        @(negedge clk);
        if (state == ST_UPDATE) cur = image[pc];
        @(posedge clk);
        #1;
        cyc++;
        if (state == ST_FETCH && !s.halted) begin
          int kind;
          kind = ref_step(s, cur, sw);
          counts[kind]++;
          if (cur[15:13] == 3'd2) counts[9 + int'(cur[1:0] == 2'd1) + 2 * int'(cur[1:0] == 2'd2)]++;
          check(32'(cyc), 32'd3, "cycles per instruction");
          cyc = 0;
          check(32'(pc), 32'(s.pc), "pc");
          check(32'(led), {16'd0, s.disp[15:0]}, "leds");
          check(32'(halted), 32'(s.halted), "halted");
          if (s.disp == 32'd55) counts[14]++;
          sw = 16'($urandom);
        end
        // display: exactly one digit lit, showing the right digit
        lit = -1;
        for (int d = 0; d < 4; d++) if (!an_n[d]) lit = d;
        check(32'($countones(~an_n)), 1, "one digit lit");
        if (lit >= 0) begin
          digits_seen[lit] = 1'b1;
          counts[12]++;
          check(32'(seg_n), 32'(pat[digit_of(s.disp, lit)]), "segments");
        end
      end
      if (s.halted) begin
        repeat (9) @(posedge clk);
        #1 check(32'(pc), 32'(s.pc), "pc frozen after end");
      end
    end
    counts[13] = $countones(digits_seen);
    counts[15] = s.retired;
    done = 1;
  end
endmodule
