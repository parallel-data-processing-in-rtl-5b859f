// debouncer: cleans up a mechanical push-button and turns each press into a
// single one-clock pulse.
//
// dirty_in is first passed through a two-flop synchronizer. A counter then
// measures how long the synchronized level has differed from the accepted
// (stable) level; once it has differed for STABLE_CYCLES consecutive clocks the
// new level is accepted. pulsed_out is high for exactly one clock when the
// accepted level goes from 0 to 1, so bounces shorter than STABLE_CYCLES
// produce nothing. reset is synchronous and clears the accepted level.
//
// The lab system uses a block with this name and these ports to start the
// sorter; how it works is this design's own choice, as is the default of
// 1,000,000 cycles (10 ms at the 100 MHz board clock).
module debouncer #(
  parameter int unsigned STABLE_CYCLES = 1_000_000
) (
  input  logic clk,
  input  logic reset,
  input  logic dirty_in,
  output logic pulsed_out
);

  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);

  logic          sync1, sync2;
  logic          stable;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    sync1 <= dirty_in;
    sync2 <= sync1;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      stable     <= 1'b0;
      count      <= '0;
      pulsed_out <= 1'b0;
    end else begin
      pulsed_out <= 1'b0;
      if (sync2 == stable) begin
        count <= '0;
      end else if (count == CW'(STABLE_CYCLES - 1)) begin
        count      <= '0;
        stable     <= sync2;
        pulsed_out <= sync2;
      end else begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
