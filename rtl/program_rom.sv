// program_rom: instruction memory of the basic CPU.
//
// DEPTH words of 16 bits (256 by default), loaded at start-up from a hex
// image, one instruction per line, as produced by an assembler. The read is
// synchronous: the word at addr appears on data one clock edge later, which
// matches the FETCH state of the control unit and maps onto FPGA block RAM.
// Words the image does not set read as 0 (a harmless "mov 0 0").
// Size and word width follow the design description; the synchronous read
// and the default image (the Fibonacci program, rtl/fibonacci.mem) are this
// design's choice.
module program_rom
  import cpu_pkg::*;
#(
  parameter int unsigned DEPTH     = 1 << PC_W,
  parameter int unsigned WIDTH     = INSTR_W,
  parameter string       INIT_FILE = "rtl/fibonacci.mem"
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         data
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) data <= mem[addr];

endmodule
