// unroll_control: loader that copies the data ROM, two items at a time, into
// the unrolled (shift) register.
//
// A Moore state machine INIT -> (READ -> WRITE) x 8 -> FINISH. INIT clears a
// 3-bit pair counter. In READ the addresses addr1 = {counter,0} and
// addr2 = {counter,1} are presented to a ROM with one clock of read latency.
// In WRITE the ROM outputs are valid, reg_wr is high so the register shifts
// the pair in, and the counter advances. After the pair at addresses 14 and 15
// the machine rests in FINISH until reset. The whole load takes 17 clocks
// after reset falls.
//
// The states, outputs and transitions are the lecture's lab module; the
// encoding of the states is left to the package enum.
module unroll_control
  import sort_pkg::*;
(
  input  logic       clk,
  input  logic       reset,     // synchronous
  output logic [3:0] addr1,
  output logic [3:0] addr2,
  output logic       reg_wr
);

  unroll_state_t state, next_state;
  logic [2:0]    pair;
  logic          clr, inc;

  always_ff @(posedge clk) begin
    if (reset) state <= UC_INIT;
    else       state <= next_state;
  end

  always_ff @(posedge clk) begin
    if (clr)      pair <= '0;
    else if (inc) pair <= pair + 1'b1;
  end

  assign addr1 = {pair, 1'b0};
  assign addr2 = {pair, 1'b1};

  always_comb begin
    next_state = state;
    reg_wr     = 1'b0;
    clr        = 1'b0;
    inc        = 1'b0;
    unique case (state)
      UC_INIT: begin
        clr        = 1'b1;
        next_state = UC_READ;
      end
      UC_READ: begin
        next_state = UC_WRITE;
      end
      UC_WRITE: begin
        reg_wr     = 1'b1;
        inc        = 1'b1;
        next_state = (pair == 3'd7) ? UC_FINISH : UC_READ;
      end
      UC_FINISH: ;
      default: next_state = UC_INIT;
    endcase
  end

endmodule
