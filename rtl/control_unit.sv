// control_unit: sequencer of the basic CPU.
//
// Every instruction takes exactly three clock cycles, one per state:
//   FETCH   - the program counter addresses the program ROM; the ROM's
//             output register captures the instruction at the end of the
//             cycle (it serves as the instruction register).
//   EXECUTE - the instruction is decoded and carried out: a register write
//             (MOV, LOAD, SAVE_ALU, LOAD_INPUT) at the end of the cycle, the
//             ALU operands and operation latched (ALU), the branch condition
//             evaluated (BRANCH_IF_ZERO) or the program stopped (END).
//   UPDATE  - the program counter moves to the next instruction (or to the
//             branch target) and the display value is refreshed from the
//             output register (register 15).
// After END the sequencer stays in FETCH with the program counter frozen
// until reset. The three states, the opcodes and the role of register 15
// follow the design description; the field layout (see cpu_pkg), the
// latching of ALU operands, the behaviour after END and the synchronous
// active-high reset (program counter 0, state FETCH) are this design's
// choices. The unused opcode 110 does nothing.
module control_unit
  import cpu_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  // program ROM
  output logic [PC_W-1:0]     pc,
  input  logic [INSTR_W-1:0]  instr,
  // board switches
  input  logic [SW_W-1:0]     switches,
  // register file
  output logic [RADDR_W-1:0]  rf_ra,
  output logic [RADDR_W-1:0]  rf_rb,
  input  logic [DATA_W-1:0]   rf_rdata_a,
  input  logic [DATA_W-1:0]   rf_rdata_b,
  output logic                rf_we,
  output logic [RADDR_W-1:0]  rf_wa,
  output logic [DATA_W-1:0]   rf_wdata,
  input  logic [DATA_W-1:0]   rf_out_reg,
  // ALU
  output logic [DATA_W-1:0]   alu_in1,
  output logic [DATA_W-1:0]   alu_in2,
  output alu_op_e             alu_op,
  input  logic [DATA_W-1:0]   alu_out,
  // status
  output state_e              state,
  output logic                halted,
  output logic [DATA_W-1:0]   display_value
);

  instr_t i;
  assign i = instr_t'(instr);

  state_e           state_q, state_d;
  logic [PC_W-1:0]  pc_q;
  logic             branch_q;     // branch taken, decided in EXECUTE
  logic             halted_q;
  logic [DATA_W-1:0] disp_q;

  wire execute = (state_q == ST_EXECUTE);

  // Register file read addresses come straight from the instruction.
  assign rf_ra = i.ra;
  assign rf_rb = i.rb;

  // Register write in EXECUTE.
  always_comb begin
    rf_we    = 1'b0;
    rf_wa    = i.ra;
    rf_wdata = '0;
    if (execute) begin
      unique case (i.op)
        OP_MOV: begin
          rf_we    = 1'b1;
          rf_wa    = i.rb;
          rf_wdata = rf_rdata_a;
        end
        OP_LOAD: begin
          rf_we    = 1'b1;
          rf_wdata = DATA_W'(instr[IMM_W-1:0]);
        end
        OP_SAVE_ALU: begin
          rf_we    = 1'b1;
          rf_wdata = alu_out;
        end
        OP_LOAD_INPUT: begin
          rf_we    = 1'b1;
          rf_wdata = DATA_W'(switches);
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (state_q)
      ST_FETCH:   state_d = halted_q ? ST_FETCH : ST_EXECUTE;
      ST_EXECUTE: state_d = ST_UPDATE;
      default:    state_d = ST_FETCH;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q  <= ST_FETCH;
      pc_q     <= '0;
      branch_q <= 1'b0;
      halted_q <= 1'b0;
      disp_q   <= '0;
      alu_in1  <= '0;
      alu_in2  <= '0;
      alu_op   <= ALU_ADD;
    end else begin
      state_q <= state_d;
      unique case (state_q)
        ST_EXECUTE: begin
          branch_q <= 1'b0;
          unique case (i.op)
            OP_ALU: begin
              alu_in1 <= rf_rdata_a;
              alu_in2 <= rf_rdata_b;
              alu_op  <= i.alu_op;
            end
            OP_BRZ: branch_q <= (rf_rdata_a == '0);
            OP_END: halted_q <= 1'b1;
            default: ;
          endcase
        end
        ST_UPDATE: begin
          if (!halted_q) pc_q <= branch_q ? instr[PC_W-1:0] : pc_q + 1'b1;
          disp_q <= rf_out_reg;
        end
        default: ;
      endcase
    end
  end

  assign pc            = pc_q;
  assign state         = state_q;
  assign halted        = halted_q;
  assign display_value = disp_q;

  // A write never happens outside EXECUTE.
  a_we_in_execute: assert property (@(posedge clk) disable iff (rst) rf_we |-> execute);

endmodule
