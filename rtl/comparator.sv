// comparator: two-input, two-output M-bit compare-and-swap element.
//
// The basic element of every sorting network in this library. It is purely
// combinational: max_value receives the larger operand and min_value the
// smaller one. Operands are unsigned. When the operands are equal, op1 goes to
// max_value (the test is op1 >= op2), which makes the element stable and
// means "no swap" in the iterative sorters.
//
// Follows the lecture's comparator exactly in function; the default width of
// 4 bits is that of its elaborated example.
module comparator #(
  parameter int unsigned M = 4   // item width in bits
) (
  input  logic [M-1:0] op1,
  input  logic [M-1:0] op2,
  output logic [M-1:0] max_value,
  output logic [M-1:0] min_value
);

  always_comb begin
    if (op1 >= op2) begin
      max_value = op1;
      min_value = op2;
    end else begin
      max_value = op2;
      min_value = op1;
    end
  end

endmodule
