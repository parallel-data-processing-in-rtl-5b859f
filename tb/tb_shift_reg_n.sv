// tb_shift_reg_n: 128-bit unrolled register taking two bytes per write.
// Random pairs are written with random enable; the output is compared with a
// queue model of the last sixteen bytes; reset must clear it.
module tb_shift_reg_n;
  localparam int unsigned L = 128, M = 8;
  logic         clk = 1'b0;
  logic         reset, en;
  logic [M-1:0] d1, d2;
  logic [L-1:0] dout, expected;
  byte unsigned hist [$];
  int checks = 0, failures = 0;

  shift_reg_n #(.L(L), .M(M)) dut (
    .clk(clk), .reset(reset), .en(en), .din1(d1), .din2(d2), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    en    = 1'b0;
    d1    = '0;
    d2    = '0;
    @(posedge clk);
    #1 reset = 1'b0;
    checks++;
    if (dout !== '0) begin failures++; $display("FAIL not cleared"); end
    for (int i = 0; i < L / 8; i++) hist.push_back(0);
    for (int k = 0; k < 200; k++) begin
      en = 1'($urandom);
      d1 = M'($urandom);
      d2 = M'($urandom);
      @(posedge clk);
      #1;
      if (en) begin
        hist.push_back(d1);
        hist.push_back(d2);
        void'(hist.pop_front());
        void'(hist.pop_front());
      end
      // hist[0] is the oldest byte = most significant
      for (int i = 0; i < L / 8; i++) expected[L-8-8*i +: 8] = hist[i];
      checks++;
      if (dout !== expected) begin
        failures++;
        $display("FAIL %h expected %h", dout, expected);
      end
    end
    reset = 1'b1;
    @(posedge clk);
    #1 checks++;
    if (dout !== '0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
