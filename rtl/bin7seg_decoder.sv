// bin7seg_decoder: hexadecimal digit to seven-segment pattern, active low.
//
// dec_out_n[0] drives segment a, [1] b, ... [6] g; a segment is lit when its
// bit is 0 (common-anode displays as on the lecture's board). Digits 0-9 and
// A-F (b and d in lower case) are shown. Purely combinational.
//
// The lecture names this block and its ports; the segment encoding is the
// usual one and the bit order is this design's choice.
module bin7seg_decoder (
  input  logic [3:0] bin_input,
  output logic [6:0] dec_out_n
);

  logic [6:0] on;   // gfedcba, 1 = lit

  always_comb begin
    unique case (bin_input)
      4'h0: on = 7'b0111111;
      4'h1: on = 7'b0000110;
      4'h2: on = 7'b1011011;
      4'h3: on = 7'b1001111;
      4'h4: on = 7'b1100110;
      4'h5: on = 7'b1101101;
      4'h6: on = 7'b1111101;
      4'h7: on = 7'b0000111;
      4'h8: on = 7'b1111111;
      4'h9: on = 7'b1101111;
      4'hA: on = 7'b1110111;
      4'hB: on = 7'b1111100;
      4'hC: on = 7'b0111001;
      4'hD: on = 7'b1011110;
      4'hE: on = 7'b1111001;
      4'hF: on = 7'b1110001;
      default: on = 7'b0000000;
    endcase
  end

  assign dec_out_n = ~on;

endmodule
