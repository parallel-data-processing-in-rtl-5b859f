// tb_top_eotn: board demo of the combinational sorting network, with a short
// display scan (6-bit counter). For random switch settings and both button
// states the testbench reads the eight digits back from the multiplexed
// segment and anode lines, decodes them, and compares them with the eight
// nibbles of the test word sorted in the testbench (smallest on the left).
module tb_top_eotn;
  localparam int unsigned CW = 6;
  logic        clk = 1'b0;
  logic        btn;
  logic [15:0] sw;
  logic [6:0]  seg;
  logic [7:0]  an;
  int checks = 0, failures = 0;
  int n_btn [2] = '{0, 0};

  top_eotn #(.SCAN_CNT_W(CW)) dut (.clk(clk), .btn_c(btn), .sw(sw), .seg(seg), .an(an));

  always #5 clk = ~clk;

  // active-low pattern (bit0 = segment a) back to a digit, -1 if unknown
  function automatic int decode(logic [6:0] p);
    logic [6:0] tbl [16] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78,
                             7'h00, 7'h10, 7'h08, 7'h03, 7'h46, 7'h21, 7'h06, 7'h0E};
    for (int d = 0; d < 16; d++) if (tbl[d] == p) return d;
    return -1;
  endfunction

  // read one full frame: digit shown on anode i
  task automatic read_display(output int dig [8]);
    for (int i = 0; i < 8; i++) dig[i] = -1;
    repeat (8 * (2**(CW-3)) + 2) begin
      @(posedge clk);
      #1;
      for (int i = 0; i < 8; i++) if (!an[i]) dig[i] = decode(seg);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dig [8];
  int v [8];
  logic [31:0] word;
  initial begin
    for (int k = 0; k < 60; k++) begin
      btn = 1'($urandom);
      sw  = 16'($urandom);
      if (k == 0) begin btn = 1'b0; sw = 16'h0000; end
      if (k == 1) begin btn = 1'b1; sw = 16'hFFFF; end
      n_btn[btn]++;
      word = btn ? {16'h1234, sw} : {sw, 16'hFEDC};
      for (int i = 0; i < 8; i++) v[i] = int'(word[i*4 +: 4]);
      v.sort();   // ascending: leftmost digit (anode 7) shows v[0]
      read_display(dig);
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (dig[7-i] != v[i]) begin
          failures++;
          $display("FAIL word %h digit %0d shows %0d expected %0d", word, 7 - i, dig[7-i], v[i]);
        end
      end
    end
    checks++;
    if (n_btn[0] == 0 || n_btn[1] == 0) begin failures++; $display("FAIL a button state was never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
