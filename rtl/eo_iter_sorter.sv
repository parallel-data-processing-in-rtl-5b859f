// eo_iter_sorter: iterative even-odd transition sorter.
//
// Instead of N hard-wired comparator levels, one pair of comparator lines
// (N-1 comparators, eot_two_lines) is reused through a feedback register.
// While reset is high the register loads input_data in parallel. Every later
// clock the register takes the output of the two lines. When a pass changes
// nothing (no comparator swapped), all neighbours are in order and ready is
// raised; it stays high while the data stays sorted, and falls on reset.
//
// Timing: reset must be high for at least one rising edge to load the data.
// ready is a register and rises on the k+1-th edge after reset falls when the
// data needed k passes (k <= N/2), so already sorted input gives ready after one
// clock. sorted_data shows the register at all times: item 0 holds the largest
// value and item N-1 the smallest once ready is high.
//
// Follows the lecture's iterative sorter, including the "register equals its
// next value" completion test. The defaults (sixteen 8-bit items) are those of
// its elaborated example; its resource measurements used N = 8, M = 32.
module eo_iter_sorter #(
  parameter int unsigned M = 8,    // item width in bits
  parameter int unsigned N = 16    // number of items, even
) (
  input  logic           clk,
  input  logic           reset,        // synchronous, loads input_data
  output logic           ready,
  input  logic [N*M-1:0] input_data,
  output logic [N*M-1:0] sorted_data
);

  logic [N*M-1:0] reg_data;
  logic [N*M-1:0] pass_out;

  eot_two_lines #(.M(M), .N(N)) u_lines (
    .data_in (reg_data),
    .data_out(pass_out)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      reg_data <= input_data;
      ready    <= 1'b0;
    end else begin
      reg_data <= pass_out;
      ready    <= (reg_data == pass_out);
    end
  end

  assign sorted_data = reg_data;

endmodule
