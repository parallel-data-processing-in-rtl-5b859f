// tb_pdp_top: end-to-end test of the whole top at its default sizes
// (16 x 8-bit lab data, 1,000,000-clock debounce filter, 20-bit display scan,
// 16 x 8-bit iterative sorter), at a 100 MHz clock.
//  * Lab system: reset, ROM load, a bouncing sort press, then the LED cycle
//    count and the four smallest bytes on the display; a glitch shorter than
//    the filter must not start a sort.
//  * Network demo: both button states with several switch settings, read back
//    from its display.
//  * Iterative sorter: reversed, sorted and random words, result and the
//    clock count until ready.
//  * Bubble, even-odd merge and bitonic networks: random 8 x 32-bit words.
// Each mechanism is counted: early completion and the full N/2-pass case of
// the iterative sorter, a sort started and ended by the start/done handshake,
// a rejected glitch, ROM pair writes, every display digit scanned, and both
// demo input modes. One that never happened counts as a failure.
module tb_pdp_top;
  localparam int unsigned M = 8, N = 16;
  localparam int unsigned DB = 1_000_000, CW = 20;
  logic           clk = 1'b0;
  logic           btnC, btnU, eotn_btnC, iter_reset, iter_ready;
  logic [15:0]    led, eotn_sw;
  logic [6:0]     seg, eotn_seg;
  logic [7:0]     an, eotn_an;
  logic [N*M-1:0] iter_input, iter_sorted;
  logic [8*32-1:0] bub_i, bub_o, oem_i, oem_o, bit_i, bit_o;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_early = 0, n_worst = 0, n_handshake = 0, n_glitch = 0, n_pair_wr = 0;
  int n_scan_lab = 0, n_scan_eotn = 0, n_mode [2] = '{0, 0};

  byte unsigned rom [16] = '{'h5A, 'h03, 'hC7, 'h81, 'h2E, 'hF0, 'h19, 'h64,
                             'hB2, 'h0D, 'h97, 'h40, 'hE5, 'h7B, 'h26, 'hA8};

  pdp_top dut (
    .clk(clk), .btnC(btnC), .btnU(btnU), .led(led), .seg(seg), .an(an),
    .eotn_btnC(eotn_btnC), .eotn_sw(eotn_sw), .eotn_seg(eotn_seg), .eotn_an(eotn_an),
    .iter_reset(iter_reset), .iter_input(iter_input), .iter_ready(iter_ready),
    .iter_sorted(iter_sorted),
    .bubble_in(bub_i), .bubble_out(bub_o), .oem_in(oem_i), .oem_out(oem_o),
    .bitonic_in(bit_i), .bitonic_out(bit_o));

  always #5 clk = ~clk;

  always @(posedge clk) if (dut.u_lab.reg_wr) n_pair_wr++;

  function automatic int decode(logic [6:0] p);
    logic [6:0] tbl [16] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78,
                             7'h00, 7'h10, 7'h08, 7'h03, 7'h46, 7'h21, 7'h06, 7'h0E};
    for (int d = 0; d < 16; d++) if (tbl[d] == p) return d;
    return -1;
  endfunction

  // One full scan of both displays; counts digits actually seen.
  task automatic read_displays(output int lab [8], output int demo [8]);
    bit seen_l [8], seen_d [8];
    for (int i = 0; i < 8; i++) begin
      lab[i] = -1; demo[i] = -1; seen_l[i] = 0; seen_d[i] = 0;
    end
    repeat (2**CW + 4) begin
      @(posedge clk);
      #1;
      for (int i = 0; i < 8; i++) begin
        if (!an[i])      begin lab[i]  = decode(seg);      seen_l[i] = 1; end
        if (!eotn_an[i]) begin demo[i] = decode(eotn_seg); seen_d[i] = 1; end
      end
    end
    for (int i = 0; i < 8; i++) begin
      n_scan_lab  += seen_l[i];
      n_scan_eotn += seen_d[i];
    end
  endtask

  function automatic int passes(int v_in [16]);
    int v [16];
    int t, n;
    logic sorted;
    v = v_in;
    n = 0;
    forever begin
      sorted = 1'b1;
      for (int i = 0; i < 15; i++) if (v[i] < v[i+1]) sorted = 1'b0;
      if (sorted) break;
      for (int i = 0; i < 16; i += 2)
        if (v[i] < v[i+1]) begin t = v[i]; v[i] = v[i+1]; v[i+1] = t; end
      for (int i = 1; i < 15; i += 2)
        if (v[i] < v[i+1]) begin t = v[i]; v[i] = v[i+1]; v[i+1] = t; end
      n++;
    end
    return n;
  endfunction

  task automatic iter_run(logic [N*M-1:0] w);
    int v [16];
    int asc [16];
    int cycles, expc;
    logic [N*M-1:0] expw;
    for (int i = 0; i < 16; i++) begin v[i] = int'(w[i*M +: M]); asc[i] = v[i]; end
    asc.sort();
    for (int i = 0; i < 16; i++) expw[(15-i)*M +: M] = M'(asc[i]);
    expc = passes(v) + 1;
    iter_input = w;
    iter_reset = 1'b1;
    @(posedge clk);
    #1 iter_reset = 1'b0;
    cycles = 0;
    while (!iter_ready && cycles < 100) begin
      @(posedge clk);
      #1 cycles++;
    end
    checks++;
    if (iter_sorted !== expw || cycles != expc) begin
      failures++;
      $display("FAIL iterative sorter %h -> %h in %0d clocks (expected %h in %0d)",
               w, iter_sorted, cycles, expw, expc);
    end
    if (cycles < N/2 + 1) n_early++;
    if (cycles == N/2 + 1) n_worst++;
  endtask

  function automatic logic [8*32-1:0] ref_net(logic [8*32-1:0] w);
    logic [31:0] v [8];
    logic [8*32-1:0] r;
    for (int i = 0; i < 8; i++) v[i] = w[i*32 +: 32];
    v.rsort();
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = v[i];
    return r;
  endfunction

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int items [16];
  int asc [16];
  int labd [8], demod [8];
  int nib [8];
  int exp_count;
  logic [N*M-1:0] w;
  logic [31:0] word;
  initial begin
    for (int a = 0; a < 16; a++) begin
      items[15-a] = rom[a];
      asc[a] = rom[a];
    end
    asc.sort();
    exp_count = passes(items) + 3;

    btnC = 1'b1; btnU = 1'b0; eotn_btnC = 1'b0; eotn_sw = 16'h0;
    iter_reset = 1'b1; iter_input = '0;
    bub_i = '0; oem_i = '0; bit_i = '0;
    repeat (3) @(posedge clk);
    #1 btnC = 1'b0;

    // iterative sorter, while the lab system loads its data
    for (int i = 0; i < N; i++) w[i*M +: M] = M'(i * 11);
    iter_run(w);
    for (int i = 0; i < N; i++) w[i*M +: M] = M'(255 - i * 4);
    iter_run(w);
    for (int k = 0; k < 20; k++) begin
      for (int i = 0; i < N; i++) w[i*M +: M] = M'($urandom);
      iter_run(w);
    end

    // the other network types
    for (int k = 0; k < 50; k++) begin
      for (int i = 0; i < 8; i++) begin
        bub_i[i*32 +: 32] = $urandom;
        oem_i[i*32 +: 32] = $urandom;
        bit_i[i*32 +: 32] = $urandom;
      end
      #1 checks++;
      if (bub_o !== ref_net(bub_i) || oem_o !== ref_net(oem_i) || bit_o !== ref_net(bit_i)) begin
        failures++;
        $display("FAIL network outputs %h %h %h", bub_o, oem_o, bit_o);
      end
    end

    // lab system: bouncing press, then held past the filter time
    for (int i = 0; i < 5; i++) begin
      btnU = 1'b1; repeat (1000) @(posedge clk);
      btnU = 1'b0; repeat (700) @(posedge clk);
    end
    btnU = 1'b1;
    while (!dut.u_lab.start) @(posedge clk);
    while (dut.u_lab.start) @(posedge clk);
    n_handshake++;
    repeat (DB / 10) @(posedge clk);
    btnU = 1'b0;
    repeat (DB + 100) @(posedge clk);
    #1 checks++;
    if (led !== 16'(exp_count)) begin
      failures++;
      $display("FAIL led %0d expected %0d", led, exp_count);
    end

    // glitch shorter than the filter: nothing may happen
    btnU = 1'b1; repeat (DB / 2) @(posedge clk);
    btnU = 1'b0; repeat (DB + 100) @(posedge clk);
    #1 checks++;
    if (dut.u_lab.start !== 1'b0 || led !== 16'(exp_count)) begin
      failures++;
      $display("FAIL glitch started a sort");
    end else n_glitch++;

    // both displays, in both demo modes
    for (int k = 0; k < 4; k++) begin
      eotn_btnC = 1'(k);
      eotn_sw   = (k < 2) ? 16'h9C3A : 16'($urandom);
      n_mode[eotn_btnC]++;
      word = eotn_btnC ? {16'h1234, eotn_sw} : {eotn_sw, 16'hFEDC};
      for (int i = 0; i < 8; i++) nib[i] = int'(word[i*4 +: 4]);
      nib.sort();
      read_displays(labd, demod);
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (demod[7-i] != nib[i]) begin
          failures++;
          $display("FAIL demo digit %0d shows %0d expected %0d", 7 - i, demod[7-i], nib[i]);
        end
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (labd[7-2*i] != asc[i] / 16 || labd[6-2*i] != asc[i] % 16) begin
          failures++;
          $display("FAIL lab display byte %0d expected %02h", i, asc[i]);
        end
      end
    end

    $display("mechanisms: early=%0d worst=%0d handshake=%0d glitch=%0d pair_writes=%0d scan_lab=%0d scan_demo=%0d mode0=%0d mode1=%0d",
             n_early, n_worst, n_handshake, n_glitch, n_pair_wr, n_scan_lab, n_scan_eotn, n_mode[0], n_mode[1]);
    checks++; if (n_early == 0)      begin failures++; $display("FAIL no early completion"); end
    checks++; if (n_worst == 0)      begin failures++; $display("FAIL no full-length sort"); end
    checks++; if (n_handshake == 0)  begin failures++; $display("FAIL no start/done handshake"); end
    checks++; if (n_glitch == 0)     begin failures++; $display("FAIL no rejected glitch"); end
    checks++; if (n_pair_wr != 8)    begin failures++; $display("FAIL %0d ROM pair writes", n_pair_wr); end
    checks++; if (n_scan_lab < 32)   begin failures++; $display("FAIL lab display not fully scanned"); end
    checks++; if (n_scan_eotn < 32)  begin failures++; $display("FAIL demo display not fully scanned"); end
    checks++; if (n_mode[0] == 0 || n_mode[1] == 0) begin failures++; $display("FAIL a demo mode unused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
