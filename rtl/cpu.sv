// cpu: top level of the basic CPU.
//
// A multi-cycle processor with 16-bit instructions, sixteen 32-bit
// registers and a 256-word program ROM. The control unit runs each
// instruction in three clock cycles (FETCH, EXECUTE, UPDATE). Inputs are the
// board clock, a reset button and 16 switches (read by LOAD_INPUT); outputs
// are a multiplexed seven-segment display showing register 15 in decimal and
// 16 LEDs. Block structure (control unit, ROM, registers, ALU, display, LEDs)
// follows the design description. The LEDs show the low 16 bits of the
// displayed value in binary; that choice, the status ports (pc, state,
// halted) and the synchronous active-high reset are this design's own.
// Everything runs in the one clock domain.
module cpu
  import cpu_pkg::*;
#(
  parameter string       PROGRAM     = "rtl/fibonacci.mem",
  parameter int unsigned NUM_DIGITS  = 4,
  parameter int unsigned REFRESH_DIV = 100_000
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [SW_W-1:0]       sw,
  output logic [NUM_DIGITS-1:0] an_n,
  output logic [6:0]            seg_n,
  output logic [15:0]           led,
  output logic [PC_W-1:0]       pc,
  output state_e                state,
  output logic                  halted
);

  logic [INSTR_W-1:0] instr;
  logic [RADDR_W-1:0] rf_ra, rf_rb, rf_wa;
  logic [DATA_W-1:0]  rf_rdata_a, rf_rdata_b, rf_wdata, rf_out_reg;
  logic               rf_we;
  logic [DATA_W-1:0]  alu_in1, alu_in2, alu_out;
  alu_op_e            alu_op;
  logic [DATA_W-1:0]  display_value;

  program_rom #(.INIT_FILE(PROGRAM)) u_rom (
    .clk  (clk),
    .addr (pc),
    .data (instr)
  );

  control_unit u_ctrl (
    .clk           (clk),
    .rst           (rst),
    .pc            (pc),
    .instr         (instr),
    .switches      (sw),
    .rf_ra         (rf_ra),
    .rf_rb         (rf_rb),
    .rf_rdata_a    (rf_rdata_a),
    .rf_rdata_b    (rf_rdata_b),
    .rf_we         (rf_we),
    .rf_wa         (rf_wa),
    .rf_wdata      (rf_wdata),
    .rf_out_reg    (rf_out_reg),
    .alu_in1       (alu_in1),
    .alu_in2       (alu_in2),
    .alu_op        (alu_op),
    .alu_out       (alu_out),
    .state         (state),
    .halted        (halted),
    .display_value (display_value)
  );

  register_file u_regs (
    .clk     (clk),
    .rst     (rst),
    .ra      (rf_ra),
    .rb      (rf_rb),
    .rdata_a (rf_rdata_a),
    .rdata_b (rf_rdata_b),
    .we      (rf_we),
    .wa      (rf_wa),
    .wdata   (rf_wdata),
    .out_reg (rf_out_reg)
  );

  alu u_alu (
    .alu_in1 (alu_in1),
    .alu_in2 (alu_in2),
    .alu_op  (alu_op),
    .alu_out (alu_out)
  );

  seg7_display #(.NUM_DIGITS(NUM_DIGITS), .REFRESH_DIV(REFRESH_DIV)) u_disp (
    .clk   (clk),
    .rst   (rst),
    .value (display_value),
    .an_n  (an_n),
    .seg_n (seg_n)
  );

  assign led = display_value[15:0];

endmodule
