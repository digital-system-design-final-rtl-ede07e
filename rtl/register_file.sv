// register_file: the sixteen 32-bit general-purpose registers.
//
// Two asynchronous read ports (ra/rb) and one write port written on the
// rising clock edge when we is high. Register OUT_IDX (15 by default) is
// also brought out on its own port, out_reg, because the program places the
// value to be displayed there. Register count and width follow the design
// description; the port arrangement and the synchronous reset that clears
// every register to 0 are this design's choice.
module register_file
  import cpu_pkg::*;
#(
  parameter int unsigned WIDTH   = DATA_W,
  parameter int unsigned N       = NREGS,
  parameter int unsigned OUT_IDX = OUT_REG
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [$clog2(N)-1:0] ra,
  input  logic [$clog2(N)-1:0] rb,
  output logic [WIDTH-1:0]     rdata_a,
  output logic [WIDTH-1:0]     rdata_b,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] wa,
  input  logic [WIDTH-1:0]     wdata,
  output logic [WIDTH-1:0]     out_reg
);

  logic [WIDTH-1:0] regs [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wdata;
    end
  end

  assign rdata_a = regs[ra];
  assign rdata_b = regs[rb];
  assign out_reg = regs[OUT_IDX];

endmodule
