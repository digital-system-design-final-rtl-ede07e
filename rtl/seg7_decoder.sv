// seg7_decoder: one BCD digit to the seven segment lines of a display digit.
//
// Combinational. seg[0] is segment a, seg[1] b, ... seg[6] g (a top, then
// clockwise, g in the middle). Segments are active low, as on common-anode
// FPGA board displays. Codes 10 to 15 are not decimal digits and blank the
// digit. The decoder's purpose follows the design description; the segment
// order, polarity and the blanking of non-decimal codes are this design's
// choice.
module seg7_decoder (
  input  logic [3:0] bcd,
  output logic [6:0] seg_n
);

  logic [6:0] seg;  // active high, {g,f,e,d,c,b,a}

  always_comb begin
    unique case (bcd)
      4'd0:    seg = 7'b0111111;
      4'd1:    seg = 7'b0000110;
      4'd2:    seg = 7'b1011011;
      4'd3:    seg = 7'b1001111;
      4'd4:    seg = 7'b1100110;
      4'd5:    seg = 7'b1101101;
      4'd6:    seg = 7'b1111101;
      4'd7:    seg = 7'b0000111;
      4'd8:    seg = 7'b1111111;
      4'd9:    seg = 7'b1101111;
      default: seg = 7'b0000000;
    endcase
  end

  assign seg_n = ~seg;

endmodule
