// tb_lab2_hls_system: the complete lab system with a short debounce filter
// (20 clocks) and a short display scan (6-bit counter).
// Sequence: reset, let the loader copy the ROM, check the unsorted word; press
// the sort button with contact bounce; then check the LED cycle count
// (sort passes + 3: capture clock, the passes, the completion pass, done
// clock), the full sorted word, and the four smallest bytes read back from
// the display. A second press must give the same count from a cleared
// counter, and a glitch shorter than the filter must not start a sort.
module tb_lab2_hls_system;
  localparam int unsigned DB = 20, CW = 6, M = 8, N = 16;
  logic        clk = 1'b0;
  logic        btn_c, btn_u;
  logic [15:0] led;
  logic [6:0]  seg;
  logic [7:0]  an;
  int checks = 0, failures = 0;

  byte unsigned rom [16] = '{'h5A, 'h03, 'hC7, 'h81, 'h2E, 'hF0, 'h19, 'h64,
                             'hB2, 'h0D, 'h97, 'h40, 'hE5, 'h7B, 'h26, 'hA8};

  lab2_hls_system #(.DEBOUNCE_CYCLES(DB), .SCAN_CNT_W(CW)) dut (
    .clk(clk), .btn_c(btn_c), .btn_u(btn_u), .led(led), .seg(seg), .an(an));

  always #5 clk = ~clk;

  function automatic int decode(logic [6:0] p);
    logic [6:0] tbl [16] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78,
                             7'h00, 7'h10, 7'h08, 7'h03, 7'h46, 7'h21, 7'h06, 7'h0E};
    for (int d = 0; d < 16; d++) if (tbl[d] == p) return d;
    return -1;
  endfunction

  task automatic read_display(output int dig [8]);
    for (int i = 0; i < 8; i++) dig[i] = -1;
    repeat (8 * (2**(CW-3)) + 2) begin
      @(posedge clk);
      #1;
      for (int i = 0; i < 8; i++) if (!an[i]) dig[i] = decode(seg);
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

  task automatic press();
    for (int i = 0; i < 4; i++) begin
      btn_u = 1'b1;
      repeat (3) @(posedge clk);
      btn_u = 1'b0;
      repeat (2) @(posedge clk);
    end
    btn_u = 1'b1;
    repeat (DB * 3) @(posedge clk);
    btn_u = 1'b0;
    repeat (DB * 2) @(posedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int items [16];
  int asc [16];
  int dig [8];
  int exp_count;
  logic [N*M-1:0] exp_unsorted, exp_sorted;
  initial begin
    for (int a = 0; a < 16; a++) begin
      items[15-a] = rom[a];                  // ROM byte a becomes item 15-a
      exp_unsorted[(15-a)*M +: M] = rom[a];
      asc[a] = rom[a];
    end
    asc.sort();
    for (int i = 0; i < 16; i++) exp_sorted[(15-i)*M +: M] = M'(asc[i]);
    exp_count = passes(items) + 3;

    btn_c = 1'b1;
    btn_u = 1'b0;
    repeat (3) @(posedge clk);
    #1 btn_c = 1'b0;
    repeat (20) @(posedge clk);
    #1 checks++;
    if (dut.unsorted_data !== exp_unsorted) begin
      failures++;
      $display("FAIL unrolled word %h expected %h", dut.unsorted_data, exp_unsorted);
    end
    for (int rep = 0; rep < 2; rep++) begin
      press();
      checks++;
      if (led !== 16'(exp_count)) begin
        failures++;
        $display("FAIL led %0d expected %0d", led, exp_count);
      end
      checks++;
      if (dut.sorted_data !== exp_sorted || dut.start !== 1'b0) begin
        failures++;
        $display("FAIL sorted %h expected %h", dut.sorted_data, exp_sorted);
      end
      read_display(dig);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (dig[7-2*i] != asc[i] / 16 || dig[6-2*i] != asc[i] % 16) begin
          failures++;
          $display("FAIL display byte %0d shows %0d%0d expected %02h", i, dig[7-2*i], dig[6-2*i], asc[i]);
        end
      end
    end
    // short glitch: no new sort, count unchanged
    btn_u = 1'b1;
    repeat (DB / 2) @(posedge clk);
    btn_u = 1'b0;
    repeat (DB * 3) @(posedge clk);
    #1 checks++;
    if (led !== 16'(exp_count) || dut.start !== 1'b0) begin
      failures++;
      $display("FAIL glitch started a sort");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
