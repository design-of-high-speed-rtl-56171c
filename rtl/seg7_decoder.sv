// seg7_decoder: drives one seven-segment digit from a 4-bit value.
//
// The digit is shown in hexadecimal (0-9, then A b C d E F). seg is
// {g, f, e, d, c, b, a}, with segment a at the top, b top right, c bottom
// right, d bottom, e bottom left, f top left and g in the middle; a 1 lights
// the segment. The design has two such display drivers feeding 7-bit buses;
// the hexadecimal code, segment order and polarity are this implementation's
// choice. Combinational.
module seg7_decoder (
  input  logic [3:0] digit,
  output logic [6:0] seg
);

  always_comb begin
    unique case (digit)
      4'h0: seg = 7'b011_1111;
      4'h1: seg = 7'b000_0110;
      4'h2: seg = 7'b101_1011;
      4'h3: seg = 7'b100_1111;
      4'h4: seg = 7'b110_0110;
      4'h5: seg = 7'b110_1101;
      4'h6: seg = 7'b111_1101;
      4'h7: seg = 7'b000_0111;
      4'h8: seg = 7'b111_1111;
      4'h9: seg = 7'b110_1111;
      4'hA: seg = 7'b111_0111;
      4'hB: seg = 7'b111_1100;
      4'hC: seg = 7'b011_1001;
      4'hD: seg = 7'b101_1110;
      4'hE: seg = 7'b111_1001;
      4'hF: seg = 7'b111_0001;
    endcase
  end

endmodule : seg7_decoder
