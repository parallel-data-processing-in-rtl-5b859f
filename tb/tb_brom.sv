// tb_brom: dual-port ROM, 16 x 8 bits. Both ports read every address, each
// port independently, and must show the stored byte one clock after the
// address; a disabled port must hold its output.
module tb_brom;
  logic       clk = 1'b0;
  logic       ena, enb;
  logic [3:0] aa, ab;
  logic [7:0] da, db;
  int checks = 0, failures = 0;

  // Expected contents, written out independently of the design's table.
  byte unsigned expected [16] = '{'h5A, 'h03, 'hC7, 'h81, 'h2E, 'hF0, 'h19, 'h64,
                                  'hB2, 'h0D, 'h97, 'h40, 'hE5, 'h7B, 'h26, 'hA8};

  brom dut (.clka(clk), .ena(ena), .addra(aa), .douta(da),
            .clkb(clk), .enb(enb), .addrb(ab), .doutb(db));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ena = 1'b1;
    enb = 1'b1;
    for (int i = 0; i < 16; i++) begin
      aa = 4'(i);
      ab = 4'(15 - i);
      @(posedge clk);
      #1 checks++;
      if (da !== expected[i] || db !== expected[15-i]) begin
        failures++;
        $display("FAIL addr %0d/%0d -> %h/%h", i, 15 - i, da, db);
      end
    end
    // disabled ports hold
    ena = 1'b0;
    enb = 1'b0;
    aa  = 4'd3;
    ab  = 4'd4;
    @(posedge clk);
    #1 checks++;
    if (da !== expected[15] || db !== expected[0]) begin
      failures++;
      $display("FAIL disabled port changed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
