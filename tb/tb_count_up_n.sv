// tb_count_up_n: 4-bit instance of the up counter, long enough to wrap.
// Random enable and reset; the count is compared with an integer model.
module tb_count_up_n;
  localparam int unsigned N = 4;
  logic         clk = 1'b0;
  logic         reset, ce;
  logic [N-1:0] count;
  int model = 0;
  int checks = 0, failures = 0;

  count_up_n #(.N(N)) dut (.clk(clk), .reset(reset), .clk_enable(ce), .count(count));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    ce    = 1'b0;
    @(posedge clk);
    #1;
    for (int k = 0; k < 300; k++) begin
      reset = ($urandom % 40) == 0;
      ce    = ($urandom % 4) != 0;
      @(posedge clk);
      #1;
      if (reset) model = 0;
      else if (ce) model = (model + 1) % (2**N);
      checks++;
      if (count !== N'(model)) begin
        failures++;
        $display("FAIL count %0d expected %0d", count, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
