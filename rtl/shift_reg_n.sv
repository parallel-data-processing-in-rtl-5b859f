// shift_reg_n: the "unrolled register" of the lab system, an L-bit register
// that takes two M-bit items per enabled clock.
//
// On a rising edge with en high, the register shifts left by 2*M bits and
// din1, din2 enter the low end (din1 above din2). After L/(2*M) writes the
// first pair written occupies the most significant 2*M bits. reset is
// synchronous and clears the register. dout shows the register.
//
// Behaviour and port set are the lecture's lab module.
module shift_reg_n #(
  parameter int unsigned L = 128,   // total width, N*M
  parameter int unsigned M = 8      // item width
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         en,
  input  logic [M-1:0] din1,
  input  logic [M-1:0] din2,
  output logic [L-1:0] dout
);

  logic [L-1:0] data;

  always_ff @(posedge clk) begin
    if (reset)   data <= '0;
    else if (en) data <= {data[L-2*M-1:0], din1, din2};
  end

  assign dout = data;

endmodule
