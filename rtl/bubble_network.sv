// bubble_network: combinational bubble/insertion sorting network for N items
// of M bits.
//
// Pass r (r = 0 .. N-2) compares neighbours (0,1), (1,2) ... (N-2-r, N-1-r)
// and carries the smallest remaining value up to wire N-1-r. Comparator i of
// pass r only needs the result of comparator i+1 of pass r-1, so it is placed
// at time step 2r+i; the passes overlap in a diagonal wave and the network
// has 2N-3 levels with N(N-1)/2 comparators. Every comparator puts the larger
// value on the lower index, so item 0 ends up holding the largest value.
// Depth and comparator count are exported as localparams, computed by walking
// the generated structure.
//
// Follows the lecture's bubble/insertion network in size and depth; the wiring
// is the standard construction. N = 8 is the lecture's example; the width
// M = 32 matches the data width of its resource comparison and is otherwise
// this design's choice.
module bubble_network #(
  parameter int unsigned M = 32,   // item width in bits
  parameter int unsigned N = 8     // number of items, at least 2
) (
  input  logic [M*N-1:0] data_in,
  output logic [M*N-1:0] data_out
);

  localparam int unsigned LEVELS = 2 * N - 3;

  // Level t holds comparator (i, i+1) when i = t - 2r for a pass r with
  // 0 <= i <= N-2-r.
  function automatic bit has_cmp(int unsigned t, int unsigned i);
    for (int unsigned r = 0; r + 1 < N; r++)
      if (2 * r + i == t && i + 2 + r <= N) return 1'b1;
    return 1'b0;
  endfunction

  function automatic int unsigned count_comparators();
    int unsigned c = 0;
    for (int unsigned t = 0; t < LEVELS; t++)
      for (int unsigned i = 0; i + 1 < N; i++)
        if (has_cmp(t, i)) c++;
    return c;
  endfunction

  function automatic int unsigned count_levels();
    int unsigned d = 0;
    for (int unsigned t = 0; t < 4 * N; t++)
      for (int unsigned i = 0; i + 1 < N; i++)
        if (has_cmp(t, i)) d = t + 1;
    return d;
  endfunction

  localparam int unsigned NUM_COMPARATORS = count_comparators();
  localparam int unsigned DEPTH           = count_levels();

  // Each level has its own input and output wires; level t takes the outputs
  // of level t-1 (or data_in).
  for (genvar t = 0; t < LEVELS; t++) begin : g_level
    logic [M-1:0] x [N];   // level input
    logic [M-1:0] y [N];   // level output
    for (genvar i = 0; i < N; i++) begin : g_in
      if (t == 0) begin : g_first
        assign x[i] = data_in[i*M +: M];
      end else begin : g_next
        assign x[i] = g_level[t-1].y[i];
      end
    end
    for (genvar i = 0; i < N; i++) begin : g_wire
      if (i + 1 < N && has_cmp(t, i)) begin : g_cmp
        comparator #(.M(M)) u_cmp (
          .op1(x[i]), .op2(x[i+1]),
          .max_value(y[i]), .min_value(y[i+1]));
      end else if (!(i > 0 && has_cmp(t, i - 1))) begin : g_pass
        assign y[i] = x[i];
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_out
    assign data_out[i*M +: M] = g_level[LEVELS-1].y[i];
  end

endmodule
