// alu: arithmetic logic unit of the basic CPU.
//
// Purely combinational. alu_out is alu_in1 + alu_in2, alu_in1 - alu_in2
// (two's complement, wrapping at 32 bits) or, for the equality compare,
// 1 when the operands are equal and 0 otherwise. The three operations and
// the port names alu_in1 / alu_in2 / alu_out follow the design description;
// the 2-bit operation code and the 0/1 form of the comparison are this
// design's choice. The reserved fourth code gives 0.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic [WIDTH-1:0] alu_in1,
  input  logic [WIDTH-1:0] alu_in2,
  input  alu_op_e          alu_op,
  output logic [WIDTH-1:0] alu_out
);

  always_comb begin
    unique case (alu_op)
      ALU_ADD: alu_out = alu_in1 + alu_in2;
      ALU_SUB: alu_out = alu_in1 - alu_in2;
      ALU_EQ:  alu_out = (alu_in1 == alu_in2) ? WIDTH'(1) : '0;
      default: alu_out = '0;
    endcase
  end

endmodule
