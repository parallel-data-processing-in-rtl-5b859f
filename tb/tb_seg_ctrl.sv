// tb_seg_ctrl: display scanner with a 6-bit counter (8 clocks per digit).
// Every clock exactly one anode must be low and the cathodes must carry the
// pattern for that digit (sa on anode 7 ... sh on anode 0); each digit must
// be lit for 8 consecutive clocks and all eight digits visited in order.
module tb_seg_ctrl;
  localparam int unsigned CW = 6;
  logic       clk = 1'b0;
  logic [6:0] pat [8];
  logic [6:0] cath;
  logic [7:0] sel;
  int checks = 0, failures = 0;
  int seen [8];

  seg_ctrl #(.CNT_W(CW)) dut (
    .clk_100mhz(clk),
    .sa(pat[7]), .sb(pat[6]), .sc(pat[5]), .sd(pat[4]),
    .se(pat[3]), .sf(pat[2]), .sg(pat[1]), .sh(pat[0]),
    .cathodes(cath), .select_display(sel));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cur, prev, run_len;
  initial begin
    for (int i = 0; i < 8; i++) begin
      pat[i]  = 7'(i * 13 + 5);
      seen[i] = 0;
    end
    prev = -1;
    run_len = 0;
    for (int k = 0; k < 8 * 8 * 3; k++) begin
      @(posedge clk);
      #1;
      cur = -1;
      for (int i = 0; i < 8; i++) if (!sel[i]) cur = i;
      checks++;
      if ($countones(~sel) != 1 || cur < 0 || cath !== pat[cur]) begin
        failures++;
        $display("FAIL sel %b cath %b", sel, cath);
      end else begin
        seen[cur]++;
        if (cur == prev) run_len++;
        else begin
          // a completed run (not the first, possibly partial one) is 8 clocks
          if (prev >= 0 && k > 8) begin
            checks++;
            if (run_len != 8 || cur != (prev + 7) % 8 && cur != (prev + 1) % 8) begin
              failures++;
              $display("FAIL run of %0d on digit %0d then %0d", run_len, prev, cur);
            end
          end
          run_len = 1;
          prev = cur;
        end
      end
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL digit %0d never lit", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
