// count_up_n: N-bit binary up counter with synchronous reset and clock enable.
//
// count clears on a rising edge with reset high and otherwise increments on
// each rising edge with clk_enable high, wrapping at 2**N. The lab system uses
// it to count the clocks a sort takes and shows the count on the LEDs.
//
// The lecture names the block and its ports (N = 16); the counting behaviour is
// the plain one its use implies.
module count_up_n #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         clk_enable,
  output logic [N-1:0] count
);

  always_ff @(posedge clk) begin
    if (reset)           count <= '0;
    else if (clk_enable) count <= count + 1'b1;
  end

endmodule
