// alu_tb: checks the ALU against directed and random operand pairs for
// every operation code, with expected values computed here.
module alu_tb;
  import cpu_pkg::*;

  logic [31:0] a, b, y;
  alu_op_e     op;
  int checks = 0, failures = 0;

  alu dut (.alu_in1(a), .alu_in2(b), .alu_op(op), .alu_out(y));

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: a=%h b=%h op=%0d got %h exp %h", what, a, b, op, y, exp);
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
    a = 32'd34; b = 32'd21;
    op = ALU_ADD; #1 check(32'd55, "add");
    op = ALU_SUB; #1 check(32'd13, "sub");
    op = ALU_EQ;  #1 check(32'd0,  "eq ne");
    b = 32'd34;   #1 check(32'd1,  "eq");
    a = 32'd0; b = 32'd1;
    op = ALU_SUB; #1 check(32'hFFFF_FFFF, "sub wrap");
    a = 32'hFFFF_FFFF; op = ALU_ADD; #1 check(32'd0, "add wrap");
    op = ALU_RSV; #1 check(32'd0, "reserved");
    repeat (2000) begin
      a = $urandom; b = ($urandom % 4 == 0) ? a : $urandom;
      op = ALU_ADD; #1 check(a + b, "rand add");
      op = ALU_SUB; #1 check(a - b, "rand sub");
      op = ALU_EQ;  #1 check({31'd0, a == b}, "rand eq");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
