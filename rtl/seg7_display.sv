// seg7_display: multiplexed seven-segment display controller.
//
// Shows the low NUM_DIGITS decimal digits of a 32-bit value. Only one digit
// is lit at a time: a refresh divider produces a one-cycle tick every
// REFRESH_DIV clock cycles, and each tick moves the scan to the next digit,
// so every digit is lit for REFRESH_DIV cycles in turn, fast enough to look
// continuously lit. The value is converted to decimal (bin_to_bcd) and the
// selected digit is decoded to segments (seg7_decoder).
// Interface: an_n selects the lit digit (one-hot, active low, an_n[0] the
// units digit); seg_n are the segments a..g of that digit, active low.
// The digit multiplexing and the need for a divider for the scan rate
// follow the design description. The divider here is a clock enable inside
// the single clock domain rather than a second clock; the four digits shown
// (as in the board photograph of the working design), the divide ratio
// (1 ms per digit at a 100 MHz clock) and the synchronous reset are this
// design's choice.
module seg7_display #(
  parameter int unsigned WIDTH       = 32,
  parameter int unsigned NUM_DIGITS  = 4,
  parameter int unsigned REFRESH_DIV = 100_000
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [WIDTH-1:0]      value,
  output logic [NUM_DIGITS-1:0] an_n,
  output logic [6:0]            seg_n
);

  localparam int unsigned BCD_DIGITS = (WIDTH * 30103) / 100000 + 1;
  localparam int unsigned CNT_W      = (REFRESH_DIV > 1) ? $clog2(REFRESH_DIV) : 1;
  localparam int unsigned SEL_W      = (NUM_DIGITS > 1) ? $clog2(NUM_DIGITS) : 1;

  logic [CNT_W-1:0]        div_q;
  logic                    tick;
  logic [SEL_W-1:0]        sel_q;
  logic [4*BCD_DIGITS-1:0] bcd;
  logic [3:0]              digit;

  assign tick = (div_q == CNT_W'(REFRESH_DIV - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      div_q <= '0;
      sel_q <= '0;
    end else begin
      div_q <= tick ? '0 : div_q + 1'b1;
      if (tick) sel_q <= (sel_q == SEL_W'(NUM_DIGITS - 1)) ? '0 : sel_q + 1'b1;
    end
  end

  bin_to_bcd #(.WIDTH(WIDTH), .DIGITS(BCD_DIGITS)) u_bcd (
    .bin (value),
    .bcd (bcd)
  );

  assign digit = bcd[4*sel_q +: 4];

  seg7_decoder u_dec (
    .bcd   (digit),
    .seg_n (seg_n)
  );

  always_comb begin
    an_n = '1;
    an_n[sel_q] = 1'b0;
  end

endmodule
