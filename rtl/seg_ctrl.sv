// seg_ctrl: time-multiplexed driver for eight seven-segment digits.
//
// A free-running CNT_W-bit counter is clocked by the 100 MHz board clock; its
// three most significant bits choose the digit being driven. The digit's
// pattern (sa for the leftmost digit ... sh for the rightmost) is put on
// cathodes and the matching anode select goes low: select_display[7] is the
// leftmost digit, [0] the rightmost, active low. Each digit is lit for
// 2**(CNT_W-3) clocks; with CNT_W = 20 that is 1.3 ms, a full refresh every
// 10.5 ms. Patterns are passed through unchanged (active low).
//
// The lecture names this block and its ports; the scan scheme and rate are
// this design's choices.
module seg_ctrl #(
  parameter int unsigned CNT_W = 20
) (
  input  logic       clk_100mhz,
  input  logic [6:0] sa, sb, sc, sd, se, sf, sg, sh,
  output logic [6:0] cathodes,
  output logic [7:0] select_display
);

  logic [CNT_W-1:0] count;   // free-running, needs no reset
  logic [2:0]       digit;

  always_ff @(posedge clk_100mhz) count <= count + 1'b1;

  assign digit = count[CNT_W-1 -: 3];

  always_comb begin
    unique case (digit)
      3'd7:    cathodes = sa;
      3'd6:    cathodes = sb;
      3'd5:    cathodes = sc;
      3'd4:    cathodes = sd;
      3'd3:    cathodes = se;
      3'd2:    cathodes = sf;
      3'd1:    cathodes = sg;
      default: cathodes = sh;
    endcase
    select_display        = '1;
    select_display[digit] = 1'b0;
  end

endmodule
