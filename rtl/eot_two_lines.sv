// eot_two_lines: one pair of comparator lines of an even-odd transition
// sorting network (an "even" line followed by an "odd" line).
//
// The N items arrive packed in data_in, item i in bits [i*M +: M]. The even
// line has N/2 comparators on item pairs (0,1), (2,3), ... (N-2,N-1); the odd
// line has N/2-1 comparators on pairs (1,2), (3,4), ... (N-3,N-2); items 0
// and N-1 pass the odd line unchanged. Each comparator puts the larger value
// on the lower index, so repeated pairs of lines move large values towards
// item 0. Purely combinational, depth two comparators.
//
// Structure as in the lecture. The lecture sizes the block by p with
// N = 2**p; here N is given directly (it must be even and at least 4) so the
// iterative sorters can use any even item count.
module eot_two_lines #(
  parameter int unsigned M = 4,   // item width in bits
  parameter int unsigned N = 8    // number of items, even
) (
  input  logic [N*M-1:0] data_in,
  output logic [N*M-1:0] data_out
);

  logic [M-1:0] b0 [N];   // line inputs
  logic [M-1:0] b1 [N];   // between the even and the odd line
  logic [M-1:0] b2 [N];   // line outputs

  for (genvar i = 0; i < N; i++) begin : g_unpack
    assign b0[i]               = data_in[i*M +: M];
    assign data_out[i*M +: M]  = b2[i];
  end

  for (genvar i = 0; i < N/2; i++) begin : g_even
    comparator #(.M(M)) u_even (
      .op1      (b0[2*i]),
      .op2      (b0[2*i+1]),
      .max_value(b1[2*i]),
      .min_value(b1[2*i+1])
    );
  end

  for (genvar i = 0; i < N/2 - 1; i++) begin : g_odd
    comparator #(.M(M)) u_odd (
      .op1      (b1[2*i+1]),
      .op2      (b1[2*i+2]),
      .max_value(b2[2*i+1]),
      .min_value(b2[2*i+2])
    );
  end

  assign b2[0]   = b1[0];
  assign b2[N-1] = b1[N-1];

endmodule
