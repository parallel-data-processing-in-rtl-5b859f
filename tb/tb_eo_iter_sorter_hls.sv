// tb_eo_iter_sorter_hls: block-protocol sorter, sixteen 8-bit items.
// Checks: ap_idle while idle and low while busy; ap_done and ap_ready are
// one-clock pulses; ap_done comes passes+1 clocks after the capturing edge;
// ap_return equals a reference sort and is held after ap_done; a start held
// high through ap_done starts the next sort at once; the input may change
// after capture without affecting the result.
module tb_eo_iter_sorter_hls;
  localparam int unsigned M = 8, N = 16;
  logic           clk = 1'b0;
  logic           rst, start, done, idle, rdy;
  logic [N*M-1:0] din, dout;
  int checks = 0, failures = 0;

  eo_iter_sorter_hls #(.M(M), .N(N)) dut (
    .ap_clk(clk), .ap_rst(rst), .ap_start(start), .ap_done(done), .ap_idle(idle),
    .ap_ready(rdy), .input_data_v(din), .ap_return(dout));

  always #5 clk = ~clk;

  function automatic logic [N*M-1:0] ref_sort(logic [N*M-1:0] w);
    int v [N];
    logic [N*M-1:0] r;
    for (int i = 0; i < N; i++) v[i] = int'(w[i*M +: M]);
    v.rsort();
    for (int i = 0; i < N; i++) r[i*M +: M] = M'(v[i]);
    return r;
  endfunction

  function automatic int passes(logic [N*M-1:0] w);
    int v [N];
    int t, n;
    logic sorted;
    for (int i = 0; i < N; i++) v[i] = int'(w[i*M +: M]);
    n = 0;
    forever begin
      sorted = 1'b1;
      for (int i = 0; i < N - 1; i++) if (v[i] < v[i+1]) sorted = 1'b0;
      if (sorted) break;
      for (int i = 0; i < N; i += 2)
        if (v[i] < v[i+1]) begin t = v[i]; v[i] = v[i+1]; v[i+1] = t; end
      for (int i = 1; i < N - 1; i += 2)
        if (v[i] < v[i+1]) begin t = v[i]; v[i] = v[i+1]; v[i+1] = t; end
      n++;
    end
    return n;
  endfunction

  function automatic logic [N*M-1:0] rand_word();
    logic [N*M-1:0] w;
    for (int i = 0; i < N; i++) w[i*M +: M] = M'($urandom);
    return w;
  endfunction

  // Start one sort; if keep_start, start stays high through ap_done.
  task automatic sort_one(logic [N*M-1:0] w, bit keep_start);
    int cycles;
    din   = w;
    start = 1'b1;
    checks++;
    if (!idle && !done) begin failures++; $display("FAIL not idle before start"); end
    @(posedge clk);             // capture edge
    #1 din = ~w;                // must not matter any more
    if (!keep_start) start = 1'b0;
    cycles = 0;
    while (!done && cycles < 4*N) begin
      checks++;
      if (idle || rdy) begin failures++; $display("FAIL idle/ready while busy"); end
      @(posedge clk);
      #1 cycles++;
    end
    checks++;
    if (cycles != passes(w) + 1) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cycles, passes(w) + 1);
    end
    checks++;
    if (dout !== ref_sort(w) || !rdy || idle) begin
      failures++;
      $display("FAIL result %h expected %h", dout, ref_sort(w));
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N*M-1:0] w;
  initial begin
    rst   = 1'b1;
    start = 1'b0;
    din   = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    checks++;
    if (!idle || done || rdy) begin failures++; $display("FAIL after reset"); end
    // reversed: N/2 passes
    for (int i = 0; i < N; i++) w[i*M +: M] = M'(i * 5 + 1);
    sort_one(w, 1'b0);
    // result held and one-clock done
    @(posedge clk);
    #1 checks++;
    if (done || rdy || !idle || dout !== ref_sort(w)) begin
      failures++;
      $display("FAIL done not single or result not held");
    end
    repeat (3) @(posedge clk);
    #1 checks++;
    if (dout !== ref_sort(w)) begin failures++; $display("FAIL result not held"); end
    // sorted input
    for (int i = 0; i < N; i++) w[i*M +: M] = M'(200 - i * 3);
    sort_one(w, 1'b0);
    @(posedge clk);
    #1;
    // back-to-back sorts with start held high
    for (int k = 0; k < 50; k++) begin
      sort_one(rand_word(), 1'b1);
    end
    start = 1'b0;
    @(posedge clk);
    #1;
    for (int k = 0; k < 100; k++) begin
      sort_one(rand_word(), 1'b0);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
