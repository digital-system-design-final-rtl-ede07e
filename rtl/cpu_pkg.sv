// cpu_pkg: types and constants shared by the basic CPU.
//
// Every instruction is 16 bits wide. Bits 15..13 hold the opcode, as the
// instruction set defines; the layout of the remaining 13 bits is this
// design's own choice, picked so that every field fits next to the 3-bit
// opcode:
//
//   MOV            000 | src[12:9]  | dst[8:5]   | -           copy src -> dst
//   LOAD           001 | rd[12:9]   | imm[8:0]                 rd <- zero-extended imm
//   ALU            010 | a[12:9]    | b[8:5]     | - | op[1:0] latch a op b
//   SAVE_ALU       011 | rd[12:9]   | -                        rd <- last ALU result
//   LOAD_INPUT     100 | rd[12:9]   | -                        rd <- switches
//   BRANCH_IF_ZERO 101 | r[12:9]    | - [8] | target[7:0]      if r == 0: pc <- target
//   (unused)       110 | -                                     no operation
//   END            111 | -                                     stop the program
//
// A 4-bit register field next to the opcode leaves 9 bits for the LOAD
// immediate, so immediates are 9 bits (0..511) rather than the 12 bits a
// wider word would allow.
package cpu_pkg;

  localparam int unsigned INSTR_W  = 16;  // instruction width
  localparam int unsigned DATA_W   = 32;  // register width
  localparam int unsigned NREGS    = 16;  // general-purpose registers
  localparam int unsigned RADDR_W  = 4;   // register index width
  localparam int unsigned PC_W     = 8;   // 256-entry program memory
  localparam int unsigned IMM_W    = 9;   // LOAD immediate width
  localparam int unsigned SW_W     = 16;  // board switches
  localparam int unsigned OUT_REG  = 15;  // register shown on the display

  typedef enum logic [2:0] {
    OP_MOV        = 3'b000,
    OP_LOAD       = 3'b001,
    OP_ALU        = 3'b010,
    OP_SAVE_ALU   = 3'b011,
    OP_LOAD_INPUT = 3'b100,
    OP_BRZ        = 3'b101,
    OP_NOP        = 3'b110,
    OP_END        = 3'b111
  } opcode_e;

  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_EQ  = 2'b10,
    ALU_RSV = 2'b11   // reserved: result 0
  } alu_op_e;

  typedef enum logic [1:0] {
    ST_FETCH   = 2'd0,
    ST_EXECUTE = 2'd1,
    ST_UPDATE  = 2'd2
  } state_e;

  // Instruction viewed as its fields.
  typedef struct packed {
    opcode_e            op;      // [15:13]
    logic [RADDR_W-1:0] ra;      // [12:9]
    logic [RADDR_W-1:0] rb;      // [8:5]
    logic [2:0]         spare;   // [4:2]
    alu_op_e            alu_op;  // [1:0]
  } instr_t;

endpackage
