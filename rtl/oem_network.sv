// oem_network: combinational even-odd merge sorting network (Batcher's
// odd-even merge sort) for N = 2**P items of M bits.
//
// Merge stage p (p = 1, 2, 4, ... N/2) merges sorted runs of length p into
// runs of length 2p in log2(p)+1 levels with distances k = p, p/2, ... 1. At
// level (p, k) wire a = i+j is compared with wire a+k for j = k mod p,
// k mod p + 2k, ... and i = 0 .. k-1, when both lie in the same run of length
// 2p. Every comparator puts the larger value on the lower index, so item 0
// ends up holding the largest value. Depth P(P+1)/2 levels,
// (P*P-P+4)*2**(P-2)-1 comparators; both are exported as localparams,
// computed by walking the generated structure.
//
// Follows the lecture's even-odd merge network in size and depth; the wiring
// is the standard construction. The default N = 8, M = 32 is the size the
// lecture's resource comparison uses.
module oem_network #(
  parameter int unsigned M = 32,   // item width in bits
  parameter int unsigned P = 3     // log2 of the number of items
) (
  input  logic [M*(2**P)-1:0] data_in,
  output logic [M*(2**P)-1:0] data_out
);

  localparam int unsigned N      = 2**P;
  localparam int unsigned LEVELS = P * (P + 1) / 2;

  function automatic int unsigned level_p(int unsigned t);
    int unsigned n = 0;
    for (int unsigned p = 1; p < N; p *= 2)
      for (int unsigned k = p; k >= 1; k /= 2) begin
        if (n == t) return p;
        n++;
      end
    return 0;
  endfunction

  function automatic int unsigned level_k(int unsigned t);
    int unsigned n = 0;
    for (int unsigned p = 1; p < N; p *= 2)
      for (int unsigned k = p; k >= 1; k /= 2) begin
        if (n == t) return k;
        n++;
      end
    return 0;
  endfunction

  // Wire compared with wire a (a < result) at level t, or N if none.
  function automatic int unsigned partner(int unsigned t, int unsigned a);
    int unsigned p = level_p(t);
    int unsigned k = level_k(t);
    for (int unsigned j = k % p; j + k < N; j += 2 * k)
      for (int unsigned i = 0; i < k && i + j + k < N; i++)
        if (i + j == a && (i + j) / (2 * p) == (i + j + k) / (2 * p))
          return a + k;
    return N;
  endfunction

  function automatic int unsigned count_comparators();
    int unsigned c = 0;
    for (int unsigned t = 0; t < LEVELS; t++)
      for (int unsigned a = 0; a < N; a++)
        if (partner(t, a) < N) c++;
    return c;
  endfunction

  // Wire a is the upper (higher-index) end of a comparator at level t.
  function automatic bit is_upper(int unsigned t, int unsigned a);
    for (int unsigned b = 0; b < a; b++)
      if (partner(t, b) == a) return 1'b1;
    return 1'b0;
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
    for (genvar a = 0; a < N; a++) begin : g_wire
      localparam int unsigned B = partner(t, a);
      if (B < N) begin : g_cmp
        comparator #(.M(M)) u_cmp (
          .op1(x[a]), .op2(x[B]),
          .max_value(y[a]), .min_value(y[B]));
      end else if (!is_upper(t, a)) begin : g_pass
        assign y[a] = x[a];
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_out
    assign data_out[i*M +: M] = g_level[LEVELS-1].y[i];
  end

endmodule
