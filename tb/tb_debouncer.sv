// tb_debouncer: debouncer with a short filter (STABLE_CYCLES = 10).
// Bounces shorter than the filter time must give no pulse; a press held
// longer gives exactly one one-clock pulse, STABLE_CYCLES + 2 or +3 clocks
// after the input settles (two synchronizer stages); releasing gives none.
module tb_debouncer;
  localparam int unsigned SC = 10;
  logic clk = 1'b0;
  logic reset, din, pulse;
  int checks = 0, failures = 0;
  int pulses = 0;

  debouncer #(.STABLE_CYCLES(SC)) dut (
    .clk(clk), .reset(reset), .dirty_in(din), .pulsed_out(pulse));

  always #5 clk = ~clk;
  always @(posedge clk) if (!reset && pulse) pulses++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bounce(int n);
    for (int i = 0; i < n; i++) begin
      din = 1'b1;
      repeat (1 + $urandom % (SC - 2)) @(posedge clk);
      din = 1'b0;
      repeat (1 + $urandom % 3) @(posedge clk);
    end
  endtask

  int t_settle, t_pulse;
  initial begin
    reset = 1'b1;
    din   = 1'b0;
    repeat (4) @(posedge clk);
    reset = 1'b0;
    repeat (4) @(posedge clk);
    for (int press = 0; press < 5; press++) begin
      pulses = 0;
      bounce(6);                    // glitches only
      repeat (SC + 5) @(posedge clk);
      checks++;
      if (pulses != 0) begin failures++; $display("FAIL pulse from glitches"); end
      bounce(4);
      din = 1'b1;                   // settles high
      t_settle = 0;
      t_pulse  = -1;
      for (int i = 0; i < 3 * SC; i++) begin
        @(posedge clk);
        #1 t_settle++;
        if (pulse && t_pulse < 0) t_pulse = t_settle;
      end
      checks++;
      if (pulses != 1) begin failures++; $display("FAIL %0d pulses for one press", pulses); end
      checks++;
      if (t_pulse < int'(SC) + 1 || t_pulse > int'(SC) + 3) begin
        failures++;
        $display("FAIL pulse after %0d clocks", t_pulse);
      end
      // bouncy release: no pulse
      pulses = 0;
      din = 1'b0;
      bounce(3);
      din = 1'b0;
      repeat (3 * SC) @(posedge clk);
      checks++;
      if (pulses != 0) begin failures++; $display("FAIL pulse on release"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
