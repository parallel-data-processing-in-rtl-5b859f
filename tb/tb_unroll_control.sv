// tb_unroll_control: the ROM-to-register loader state machine.
// After reset it must produce exactly eight write cycles, alternating with
// read cycles, with address pairs (0,1), (2,3) ... (14,15) held stable during
// the read cycle and the following write cycle, finish 17 clocks after reset
// falls and then stay quiet. A second reset must repeat the sequence.
module tb_unroll_control;
  logic       clk = 1'b0;
  logic       reset, wr;
  logic [3:0] a1, a2;
  int checks = 0, failures = 0;

  unroll_control dut (.clk(clk), .reset(reset), .addr1(a1), .addr2(a2), .reg_wr(wr));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_load();
    int writes, cyc, last_wr;
    logic [3:0] prev_a1;
    reset = 1'b1;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    writes  = 0;
    last_wr = 0;
    prev_a1 = 4'hF;
    for (cyc = 1; cyc <= 40; cyc++) begin
      // now in the cycle after the cyc-th edge since reset fell, minus one
      if (wr) begin
        checks++;
        if (a1 !== 4'(2 * writes) || a2 !== 4'(2 * writes + 1) || prev_a1 !== a1) begin
          failures++;
          $display("FAIL write %0d at addr %0d,%0d (read cycle addr %0d)", writes, a1, a2, prev_a1);
        end
        writes++;
        last_wr = cyc;
      end
      prev_a1 = a1;
      @(posedge clk);
      #1;
    end
    checks++;
    if (writes != 8) begin failures++; $display("FAIL %0d writes", writes); end
    checks++;
    // INIT, then READ/WRITE pairs: the 8th write is in the 17th cycle
    if (last_wr != 17) begin failures++; $display("FAIL last write in cycle %0d", last_wr); end
  endtask

  initial begin
    reset = 1'b1;
    run_load();
    run_load();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
