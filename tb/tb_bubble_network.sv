// tb_bubble_network: bubble/insertion sorting network.
// Checks the comparator count and depth of an N = 8 and an N = 16 instance
// against the closed formulas (C = N(N-1)/2, D = 2N-3), then sorts every 0/1 input of the
// 8-item instance (by the 0-1 principle this proves it sorts any input) and
// random words on both instances, comparing with a reference sort (largest
// value in item 0).
module tb_bubble_network;
  localparam int unsigned M = 32;
  logic [8*M-1:0]  d8,  q8;
  logic [16*6-1:0] d16, q16;
  int checks = 0, failures = 0;

  bubble_network #(.M(M), .N(8)) dut8  (.data_in(d8),  .data_out(q8));
  bubble_network #(.M(6), .N(16)) dut16 (.data_in(d16), .data_out(q16));

  function automatic int c_formula(int n, int p);
    return n * (n - 1) / 2;
  endfunction
  function automatic int d_formula(int n, int p);
    return 2 * n - 3;
  endfunction

  function automatic logic [8*M-1:0] ref8(logic [8*M-1:0] w);
    logic [M-1:0] v [8];
    logic [8*M-1:0] r;
    for (int i = 0; i < 8; i++) v[i] = w[i*M +: M];
    v.rsort();
    for (int i = 0; i < 8; i++) r[i*M +: M] = v[i];
    return r;
  endfunction
  function automatic logic [16*6-1:0] ref16(logic [16*6-1:0] w);
    logic [5:0] v [16];
    logic [16*6-1:0] r;
    for (int i = 0; i < 16; i++) v[i] = w[i*6 +: 6];
    v.rsort();
    for (int i = 0; i < 16; i++) r[i*6 +: 6] = v[i];
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut8.NUM_COMPARATORS != c_formula(8, 3) || dut8.DEPTH != d_formula(8, 3) ||
        dut8.NUM_COMPARATORS != 28 || dut8.DEPTH != 13) begin
      failures++;
      $display("FAIL N=8: %0d comparators, depth %0d", dut8.NUM_COMPARATORS, dut8.DEPTH);
    end
    checks++;
    if (dut16.NUM_COMPARATORS != c_formula(16, 4) || dut16.DEPTH != d_formula(16, 4)) begin
      failures++;
      $display("FAIL N=16: %0d comparators, depth %0d", dut16.NUM_COMPARATORS, dut16.DEPTH);
    end
    for (int b = 0; b < 256; b++) begin
      for (int i = 0; i < 8; i++) d8[i*M +: M] = b[i] ? M'(1) : M'(0);
      #1 checks++;
      if (q8 !== ref8(d8)) begin failures++; $display("FAIL 0/1 input %b", 8'(b)); end
    end
    for (int k = 0; k < 1000; k++) begin
      for (int i = 0; i < 8; i++) d8[i*M +: M] = M'($urandom);
      if (k % 2 == 0) for (int i = 0; i < 8; i++) d8[i*M +: M] = M'($urandom % 5);
      for (int i = 0; i < 16; i++) d16[i*6 +: 6] = 6'($urandom);
      #1 checks++;
      if (q8 !== ref8(d8)) begin failures++; $display("FAIL %h -> %h", d8, q8); end
      checks++;
      if (q16 !== ref16(d16)) begin failures++; $display("FAIL %h -> %h", d16, q16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
