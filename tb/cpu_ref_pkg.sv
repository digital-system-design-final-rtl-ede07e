// cpu_ref_pkg: instruction-level reference model of the basic CPU, used by
// the testbenches to predict registers, program counter and display value
// after every instruction. It is written from the instruction set alone
// (opcode in bits 15..13, fields as listed in cpu_pkg) and shares no code
// with the RTL.
package cpu_ref_pkg;

  typedef struct {
    logic [31:0] r [16];
    logic [7:0]  pc;
    logic [31:0] a, b;     // latched ALU operands
    logic [1:0]  op;       // latched ALU operation
    logic        halted;
    logic [31:0] disp;
    int unsigned retired;
  } ref_state_t;

  function automatic void ref_reset(ref ref_state_t s);
    foreach (s.r[k]) s.r[k] = '0;
    s.pc = '0; s.a = '0; s.b = '0; s.op = '0;
    s.halted = 1'b0; s.disp = '0; s.retired = 0;
  endfunction

  function automatic logic [31:0] ref_alu(logic [31:0] a, logic [31:0] b, logic [1:0] op);
    case (op)
      2'd0: return a + b;
      2'd1: return a - b;
      2'd2: return (a == b) ? 32'd1 : 32'd0;
      default: return 32'd0;
    endcase
  endfunction

  // Execute one instruction; returns a small code naming what happened:
  // 0 mov, 1 load, 2 alu, 3 save_alu, 4 load_input, 5 branch taken,
  // 6 branch not taken, 7 end, 8 nop.
  function automatic int ref_step(ref ref_state_t s, input logic [15:0] ins,
                                  input logic [15:0] sw);
    int kind;
    logic [3:0] fa, fb;
    logic take;
    fa = ins[12:9];
    fb = ins[8:5];
    take = 1'b0;
    case (ins[15:13])
      3'd0: begin s.r[fb] = s.r[fa]; kind = 0; end
      3'd1: begin s.r[fa] = {23'd0, ins[8:0]}; kind = 1; end
      3'd2: begin s.a = s.r[fa]; s.b = s.r[fb]; s.op = ins[1:0]; kind = 2; end
      3'd3: begin s.r[fa] = ref_alu(s.a, s.b, s.op); kind = 3; end
      3'd4: begin s.r[fa] = {16'd0, sw}; kind = 4; end
      3'd5: begin take = (s.r[fa] == 0); kind = take ? 5 : 6; end
      3'd7: begin s.halted = 1'b1; kind = 7; end
      default: kind = 8;
    endcase
    s.disp = s.r[15];
    if (!s.halted) s.pc = take ? ins[7:0] : s.pc + 8'd1;
    s.retired++;
    return kind;
  endfunction

endpackage
