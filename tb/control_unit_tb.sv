// control_unit_tb: runs the control unit against models of the program ROM
// (registered read), the register file and the ALU kept in this testbench,
// and compares program counter, registers, display value and halt flag with
// the reference model (cpu_ref_pkg) after every instruction. Programs: the
// countdown program, then random programs of every opcode with branch
// targets inside the program. Also checks that every instruction takes
// exactly three clock cycles and that nothing moves after END.
module control_unit_tb;
  import cpu_pkg::*;
  import cpu_ref_pkg::*;

  logic        clk = 0, rst;
  logic [7:0]  pc;
  logic [15:0] instr, sw;
  logic [3:0]  rf_ra, rf_rb, rf_wa;
  logic [31:0] rf_rdata_a, rf_rdata_b, rf_wdata, rf_out_reg;
  logic        rf_we;
  logic [31:0] alu_in1, alu_in2, alu_out;
  alu_op_e     alu_op;
  state_e      state;
  logic        halted;
  logic [31:0] display_value;

  logic [15:0] prog [256];
  logic [31:0] regs [16];
  ref_state_t  s;
  int checks = 0, failures = 0;
  int seen [9];

  control_unit dut (.*, .switches(sw));

  always #5 clk = ~clk;

  // ROM, register file and ALU models
  always_ff @(posedge clk) instr <= prog[pc];
  always_ff @(posedge clk) if (rst) foreach (regs[k]) regs[k] <= '0;
                           else if (rf_we) regs[rf_wa] <= rf_wdata;
  assign rf_rdata_a = regs[rf_ra];
  assign rf_rdata_b = regs[rf_rb];
  assign rf_out_reg = regs[15];
  assign alu_out = ref_alu(alu_in1, alu_in2, alu_op);

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h (retired %0d)", what, got, exp, s.retired);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run the loaded program for at most max_instr instructions.
  task automatic run(input int max_instr);
    int cyc;
    logic [15:0] cur;
    rst = 1; sw = 16'($urandom);
    @(posedge clk); @(posedge clk); #1 rst = 0;
    ref_reset(s);
    cyc = 0;
    while (s.retired < max_instr && !s.halted) begin
      @(negedge clk);
      if (state == ST_UPDATE) cur = instr;
      @(posedge clk);
      #1;
      cyc++;
      if (state == ST_FETCH) begin
        // an instruction just completed
        seen[ref_step(s, cur, sw)]++;
        check(32'(cyc), 32'd3, "cycles per instruction");
        cyc = 0;
        check(32'(pc), 32'(s.pc), "pc");
        check(display_value, s.disp, "display");
        check(32'(halted), 32'(s.halted), "halted");
        foreach (regs[k]) check(regs[k], s.r[k], $sformatf("r%0d", k));
        sw = 16'($urandom);
      end
    end
    // after END nothing changes
    if (s.halted) begin
      repeat (12) @(posedge clk);
      #1;
      check(32'(pc), 32'(s.pc), "pc frozen");
      check(32'(state), 32'(ST_FETCH), "state frozen");
      check(32'(rf_we), 0, "no writes after end");
    end
  endtask

  initial begin
    rst = 1; sw = 0;
    // countdown: r0 = 5 down to 0, shown through r15, then END
    foreach (prog[k]) prog[k] = 16'hE000;
    prog[0] = 16'h2005; prog[1] = 16'h2201; prog[2] = 16'h2400; prog[3] = 16'h01E0;
    prog[4] = 16'hA008; prog[5] = 16'h4021; prog[6] = 16'h6000; prog[7] = 16'hA403;
    prog[8] = 16'hE000;
    run(1000);
    check(32'(s.halted), 1, "countdown ends");
    check(32'(s.retired), 32'd31, "countdown length");
    check(regs[15], 0, "countdown final display");
    // random programs
    for (int p = 0; p < 40; p++) begin
      foreach (prog[k]) begin
        logic [15:0] w;
        w = 16'($urandom);
        if (w[15:13] == 3'd5) w[7:0] = 8'($urandom % 64);
        if (w[15:13] == 3'd7 && ($urandom % 4) != 0) w[15:13] = 3'd2;
        prog[k] = w;
      end
      run(300);
    end
    foreach (seen[k]) check(32'(seen[k] > 0), 1, $sformatf("instruction kind %0d seen", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
