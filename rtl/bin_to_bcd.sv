// bin_to_bcd: binary to binary-coded-decimal converter.
//
// Combinational shift-and-add-3 ("double dabble"): the binary value is
// shifted into a row of 4-bit decimal digits one bit at a time, most
// significant bit first, and before each shift every digit of 5 or more is
// increased by 3 so that it carries correctly into the next digit. DIGITS
// defaults to the number of decimal digits a WIDTH-bit value can need
// (10 for 32 bits). bcd[3:0] is the units digit. The display path of the
// design shows the output register in decimal; the conversion method is
// this design's choice.
module bin_to_bcd #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned DIGITS = (WIDTH * 30103) / 100000 + 1
) (
  input  logic [WIDTH-1:0]    bin,
  output logic [4*DIGITS-1:0] bcd
);

  always_comb begin
    logic [4*DIGITS-1:0] acc;
    acc = '0;
    for (int b = WIDTH - 1; b >= 0; b--) begin
      for (int d = 0; d < DIGITS; d++) begin
        if (acc[4*d +: 4] >= 4'd5) acc[4*d +: 4] = acc[4*d +: 4] + 4'd3;
      end
      acc = {acc[4*DIGITS-2:0], bin[b]};
    end
    bcd = acc;
  end

endmodule
