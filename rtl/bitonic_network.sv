// bitonic_network: combinational bitonic merge sorting network for N = 2**P
// items of M bits.
//
// The network is built level by level. Merge stage k (k = 2, 4, ... N) has
// log2(k) levels with distances j = k/2, k/4, ... 1; at each level wire i is
// compared with wire i^j. The comparator direction alternates with bit k of
// the wire index, which forms bitonic sequences that the next stage merges.
// At the last stage every comparator puts the larger value on the lower
// index, so item 0 ends up holding the largest value, like the other sorters
// in this library. Depth P(P+1)/2 levels, (P*P+P)*2**(P-2) comparators; both
// are exported as localparams, computed by walking the generated structure.
//
// Follows the lecture's bitonic merge network in size and depth; the wiring
// is the standard bitonic construction. The default N = 8, M = 32 is the size
// the lecture's resource comparison uses.
module bitonic_network #(
  parameter int unsigned M = 32,   // item width in bits
  parameter int unsigned P = 3     // log2 of the number of items
) (
  input  logic [M*(2**P)-1:0] data_in,
  output logic [M*(2**P)-1:0] data_out
);

  localparam int unsigned N      = 2**P;
  localparam int unsigned LEVELS = P * (P + 1) / 2;

  // Merge-stage size k and distance j of level t.
  function automatic int unsigned level_k(int unsigned t);
    int unsigned n = 0;
    for (int unsigned k = 2; k <= N; k *= 2)
      for (int unsigned j = k / 2; j >= 1; j /= 2) begin
        if (n == t) return k;
        n++;
      end
    return 0;
  endfunction

  function automatic int unsigned level_j(int unsigned t);
    int unsigned n = 0;
    for (int unsigned k = 2; k <= N; k *= 2)
      for (int unsigned j = k / 2; j >= 1; j /= 2) begin
        if (n == t) return j;
        n++;
      end
    return 0;
  endfunction

  function automatic int unsigned count_comparators();
    int unsigned c = 0;
    for (int unsigned t = 0; t < LEVELS; t++)
      for (int unsigned i = 0; i < N; i++)
        if ((i ^ level_j(t)) > i) c++;
    return c;
  endfunction

  localparam int unsigned NUM_COMPARATORS = count_comparators();
  localparam int unsigned DEPTH           = LEVELS;

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
    localparam int unsigned K = level_k(t);
    localparam int unsigned J = level_j(t);
    for (genvar i = 0; i < N; i++) begin : g_wire
      if ((i ^ J) > i) begin : g_cmp
        if ((i & K) == 0) begin : g_down   // larger value to the lower index
          comparator #(.M(M)) u_cmp (
            .op1(x[i]), .op2(x[i ^ J]),
            .max_value(y[i]), .min_value(y[i ^ J]));
        end else begin : g_up              // larger value to the higher index
          comparator #(.M(M)) u_cmp (
            .op1(x[i]), .op2(x[i ^ J]),
            .max_value(y[i ^ J]), .min_value(y[i]));
        end
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_out
    assign data_out[i*M +: M] = g_level[LEVELS-1].y[i];
  end

endmodule
