// tb_eot_two_lines: one even line plus one odd line on eight 4-bit items.
// Random words are applied; the expected word is computed by a behavioural
// model of the two comparator lines (larger value to the lower index).
module tb_eot_two_lines;
  localparam int unsigned M = 4, N = 8;
  logic [N*M-1:0] din, dout;
  int checks = 0, failures = 0;

  eot_two_lines #(.M(M), .N(N)) dut (.data_in(din), .data_out(dout));

  function automatic logic [N*M-1:0] model(logic [N*M-1:0] w);
    int v [N];
    int t;
    logic [N*M-1:0] r;
    for (int i = 0; i < N; i++) v[i] = int'(w[i*M +: M]);
    for (int i = 0; i < N; i += 2)
      if (v[i] < v[i+1]) begin t = v[i]; v[i] = v[i+1]; v[i+1] = t; end
    for (int i = 1; i < N - 1; i += 2)
      if (v[i] < v[i+1]) begin t = v[i]; v[i] = v[i+1]; v[i+1] = t; end
    for (int i = 0; i < N; i++) r[i*M +: M] = M'(v[i]);
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ascending by index: every comparator must swap
    din = 32'hFEDCBA98;
    #1;
    checks++;
    if (dout !== model(din)) begin failures++; $display("FAIL %h -> %h", din, dout); end
    for (int k = 0; k < 500; k++) begin
      din = $urandom;
      #1;
      checks++;
      if (dout !== model(din)) begin
        failures++;
        $display("FAIL %h -> %h expected %h", din, dout, model(din));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
