// tb_eot_network: the full combinational even-odd transition network,
// 8 items of 4 bits (the default size). Random and corner-case words are
// applied; the output must be the input items sorted with the largest value
// in item 0, checked against a reference sort done in the testbench.
module tb_eot_network;
  localparam int unsigned M = 4, P = 3, N = 2**P;
  logic [N*M-1:0] din, dout;
  int checks = 0, failures = 0;

  eot_network #(.M(M), .P(P)) dut (.data_in(din), .data_out(dout));

  function automatic logic [N*M-1:0] ref_sort(logic [N*M-1:0] w);
    int v [N];
    logic [N*M-1:0] r;
    for (int i = 0; i < N; i++) v[i] = int'(w[i*M +: M]);
    v.rsort();   // descending
    for (int i = 0; i < N; i++) r[i*M +: M] = M'(v[i]);
    return r;
  endfunction

  task automatic check(logic [N*M-1:0] w);
    din = w;
    #1;
    checks++;
    if (dout !== ref_sort(w)) begin
      failures++;
      $display("FAIL %h -> %h expected %h", w, dout, ref_sort(w));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h01234567);   // worst case: fully reversed
    check(32'hFEDCBA98);
    check(32'h76543210);   // already sorted
    check(32'h00000000);
    check(32'h5A5A5A5A);
    for (int k = 0; k < 2000; k++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
