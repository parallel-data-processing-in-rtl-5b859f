// lab2_hls_system: complete lab system around the block-protocol sorter.
//
// After btn_c (reset) is released, the unroll controller copies the sixteen
// bytes of the dual-port ROM, two per write, into the 128-bit unrolled
// register (17 clocks); ROM byte a ends up as item 15-a of the word. A press
// of btn_u (sort) is debounced into a one-clock pulse. That pulse clears the
// cycle counter and, one clock later, a start flag is set. The start flag
// drives the sorter's ap_start and the counter's enable; it is cleared when
// the sorter reports ap_done (or on reset). So the LEDs show the number of
// clocks the start flag was high, i.e. the sort time in clocks including the
// capture and done cycles. The display shows the most significant 32 bits of
// the sorted word, which are the four smallest items (smallest on the left).
//
// Blocks, their connections and the start/counter logic follow the lecture's
// lab; which 32 bits are displayed, and driving the sorter's reset straight
// from btn_c, are this design's choices.
module lab2_hls_system
  import sort_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000,
  parameter int unsigned SCAN_CNT_W      = 20
) (
  input  logic        clk,
  input  logic        btn_c,    // reset
  input  logic        btn_u,    // sort
  output logic [15:0] led,
  output logic [6:0]  seg,
  output logic [7:0]  an
);

  localparam int unsigned M = LAB_M;
  localparam int unsigned N = LAB_N;

  logic           reset;
  logic           sort_pulse;
  logic           start, done;
  logic [3:0]     addr1, addr2;
  logic           reg_wr;
  logic [M-1:0]   douta, doutb;
  logic [N*M-1:0] unsorted_data, sorted_data;
  logic [6:0]     hex [8];

  assign reset = btn_c;

  debouncer #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_debouncer (
    .clk       (clk),
    .reset     (reset),
    .dirty_in  (btn_u),
    .pulsed_out(sort_pulse)
  );

  unroll_control u_unroll (
    .clk   (clk),
    .reset (reset),
    .addr1 (addr1),
    .addr2 (addr2),
    .reg_wr(reg_wr)
  );

  brom #(.ADDR_W(4), .DATA_W(M)) u_brom (
    .clka (clk),
    .ena  (1'b1),
    .addra(addr1),
    .douta(douta),
    .clkb (clk),
    .enb  (1'b1),
    .addrb(addr2),
    .doutb(doutb)
  );

  shift_reg_n #(.L(N*M), .M(M)) u_unrolled_reg (
    .clk  (clk),
    .reset(reset),
    .en   (reg_wr),
    .din1 (douta),
    .din2 (doutb),
    .dout (unsorted_data)
  );

  // Start flag: set by the debounced sort pulse, cleared by done or reset.
  always_ff @(posedge clk) begin
    if (reset || done) start <= 1'b0;
    else if (sort_pulse) start <= 1'b1;
  end

  eo_iter_sorter_hls #(.M(M), .N(N)) u_sorter (
    .ap_clk      (clk),
    .ap_rst      (reset),
    .ap_start    (start),
    .ap_done     (done),
    .ap_idle     (),
    .ap_ready    (),
    .input_data_v(unsorted_data),
    .ap_return   (sorted_data)
  );

  count_up_n #(.N(16)) u_count_cycles (
    .clk       (clk),
    .reset     (sort_pulse),
    .clk_enable(start),
    .count     (led)
  );

  for (genvar i = 0; i < 8; i++) begin : g_dec
    bin7seg_decoder u_dec (
      .bin_input(sorted_data[N*M-32 + i*4 +: 4]),
      .dec_out_n(hex[i])
    );
  end

  seg_ctrl #(.CNT_W(SCAN_CNT_W)) u_disp (
    .clk_100mhz    (clk),
    .sa            (hex[7]),
    .sb            (hex[6]),
    .sc            (hex[5]),
    .sd            (hex[4]),
    .se            (hex[3]),
    .sf            (hex[2]),
    .sg            (hex[1]),
    .sh            (hex[0]),
    .cathodes      (seg),
    .select_display(an)
  );

endmodule
