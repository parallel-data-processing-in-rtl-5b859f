// tb_eo_iter_sorter: iterative even-odd transition sorter at its default size
// (sixteen 8-bit items). For each word the testbench loads it with one reset
// clock, then counts clocks until ready. The sorted result is compared with a
// reference sort, and the clock count with the number of even+odd passes the
// data needs plus one (the pass that detects completion), which may not
// exceed N/2 + 1. ready must stay low until then. A second instance at
// eight 32-bit items (the size of the published area comparison) sorts random
// words and must be ready within N/2 + 1 = 5 clocks.
module tb_eo_iter_sorter;
  localparam int unsigned M = 8, N = 16;
  logic           clk = 1'b0;
  logic           reset;
  logic           ready;
  logic [N*M-1:0] din, dout;
  int checks = 0, failures = 0;
  int early = 0;

  eo_iter_sorter #(.M(M), .N(N)) dut (
    .clk(clk), .reset(reset), .ready(ready), .input_data(din), .sorted_data(dout));

  always #5 clk = ~clk;

  // eight 32-bit items
  logic          reset8, ready8;
  logic [255:0]  din8, dout8;
  eo_iter_sorter #(.M(32), .N(8)) dut8 (
    .clk(clk), .reset(reset8), .ready(ready8), .input_data(din8), .sorted_data(dout8));

  function automatic logic [255:0] ref_sort8(logic [255:0] w);
    logic [31:0] v [8];
    logic [255:0] r;
    for (int i = 0; i < 8; i++) v[i] = w[i*32 +: 32];
    v.rsort();
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = v[i];
    return r;
  endfunction

  task automatic run8(logic [255:0] w);
    int cycles;
    din8   = w;
    reset8 = 1'b1;
    @(posedge clk);
    #1 reset8 = 1'b0;
    cycles = 0;
    while (!ready8 && cycles < 20) begin
      @(posedge clk);
      #1 cycles++;
    end
    checks++;
    if (dout8 !== ref_sort8(w) || cycles > 5) begin
      failures++;
      $display("FAIL 8x32 %h -> %h in %0d clocks", w, dout8, cycles);
    end
  endtask

  function automatic logic [N*M-1:0] ref_sort(logic [N*M-1:0] w);
    int v [N];
    logic [N*M-1:0] r;
    for (int i = 0; i < N; i++) v[i] = int'(w[i*M +: M]);
    v.rsort();
    for (int i = 0; i < N; i++) r[i*M +: M] = M'(v[i]);
    return r;
  endfunction

  // Number of even+odd passes until the data is in order.
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

  task automatic run(logic [N*M-1:0] w);
    int cycles, exp_cycles;
    din   = w;
    reset = 1'b1;
    @(posedge clk);
    #1 reset = 1'b0;
    cycles = 0;
    exp_cycles = passes(w) + 1;
    while (!ready && cycles < 4*N) begin
      @(posedge clk);
      #1 cycles++;
    end
    checks++;
    if (dout !== ref_sort(w)) begin
      failures++;
      $display("FAIL data %h -> %h expected %h", w, dout, ref_sort(w));
    end
    checks++;
    if (cycles != exp_cycles || cycles > N/2 + 1) begin
      failures++;
      $display("FAIL cycles %0d expected %0d for %h", cycles, exp_cycles, w);
    end
    if (cycles < N/2 + 1) early++;
    // ready must hold while the data stays sorted
    @(posedge clk);
    #1 checks++;
    if (!ready || dout !== ref_sort(w)) begin
      failures++;
      $display("FAIL ready/data did not hold");
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N*M-1:0] w;
  logic [255:0]   w8;
  initial begin
    reset8 = 1'b1;
    din8   = '0;
    reset = 1'b1;
    din   = '0;
    @(posedge clk);
    // reversed order (smallest in item 0): the slowest case
    for (int i = 0; i < N; i++) w[i*M +: M] = M'(i * 7);
    run(w);
    // already sorted: ready after one clock
    for (int i = 0; i < N; i++) w[i*M +: M] = M'(250 - i * 9);
    run(w);
    // all equal
    run('0);
    for (int k = 0; k < 300; k++) begin
      for (int i = 0; i < N; i++) w[i*M +: M] = M'($urandom);
      run(w);
    end
    for (int k = 0; k < 200; k++) begin
      for (int i = 0; i < 8; i++) w8[i*32 +: 32] = $urandom;
      run8(w8);
    end
    checks++;
    if (early == 0) begin failures++; $display("FAIL no early completion seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
