// eot_network: combinational even-odd transition sorting network for
// N = 2**P items of M bits.
//
// N/2 pairs of comparator lines (eot_two_lines) are chained, giving N
// comparator levels and N*(N-1)/2 comparators. After the last level the items
// are in order: item 0 (bits [M-1:0]) holds the largest value and item N-1
// the smallest. No clock; the delay is N comparator delays.
//
// Structure and default sizes (M = 4, p = 3, i.e. eight 4-bit items) follow
// the lecture's board demo.
module eot_network #(
  parameter int unsigned M = 4,   // item width in bits
  parameter int unsigned P = 3    // log2 of the number of items
) (
  input  logic [M*(2**P)-1:0] data_in,
  output logic [M*(2**P)-1:0] data_out
);

  localparam int unsigned N = 2**P;

  logic [N*M-1:0] bl [N/2+1];   // data between stages

  assign bl[0] = data_in;

  for (genvar i = 0; i < N/2; i++) begin : g_stage
    eot_two_lines #(.M(M), .N(N)) u_pair (
      .data_in (bl[i]),
      .data_out(bl[i+1])
    );
  end

  assign data_out = bl[N/2];

endmodule
