// seven_seg_hex: hexadecimal digit to seven-segment decoder.
//
// Combinational. seg[0] .. seg[6] drive segments a .. g (a top, b upper
// right, c lower right, d bottom, e lower left, f upper left, g middle).
// Digits 0-9 and A, b, C, d, E, F use the usual shapes. With ACTIVE_LOW = 1
// (default) a lit segment is driven 0, as on common-anode board displays.
module seven_seg_hex #(
  parameter bit ACTIVE_LOW = 1'b1
) (
  input  logic [3:0] digit,
  output logic [6:0] seg
);
  logic [6:0] lit;  // {g, f, e, d, c, b, a}, 1 = segment on

  always_comb begin
    unique case (digit)
      4'h0: lit = 7'b0111111;
      4'h1: lit = 7'b0000110;
      4'h2: lit = 7'b1011011;
      4'h3: lit = 7'b1001111;
      4'h4: lit = 7'b1100110;
      4'h5: lit = 7'b1101101;
      4'h6: lit = 7'b1111101;
      4'h7: lit = 7'b0000111;
      4'h8: lit = 7'b1111111;
      4'h9: lit = 7'b1101111;
      4'hA: lit = 7'b1110111;
      4'hB: lit = 7'b1111100;
      4'hC: lit = 7'b0111001;
      4'hD: lit = 7'b1011110;
      4'hE: lit = 7'b1111001;
      4'hF: lit = 7'b1110001;
      default: lit = 7'b0000000;
    endcase
    seg = ACTIVE_LOW ? ~lit : lit;
  end
endmodule
