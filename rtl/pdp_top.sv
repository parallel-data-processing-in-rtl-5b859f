// pdp_top: the three parallel-sort designs side by side on one clock.
//
//  * lab2_hls_system - ROM-loaded 16 x 8-bit data sorted by the iterative
//    sorter with a start/done protocol; cycle count on led, result on seg/an.
//  * top_eotn        - switch-driven demo of the combinational even-odd
//    transition network (8 x 4 bits) on its own display (eotn_seg/eotn_an).
//  * eo_iter_sorter  - the iterative even-odd transition sorter with its
//    load/ready interface brought straight out (iter_*).
//  * bubble_network, oem_network, bitonic_network - the other three
//    combinational network types (bubble/insertion, even-odd merge, bitonic
//    merge), 8 items of 32 bits each, with their own input and output ports.
// The designs share nothing but the clock. Each port group keeps the timing
// of the block it belongs to.
module pdp_top #(
  parameter int unsigned ITER_M          = 8,
  parameter int unsigned ITER_N          = 16,
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000,
  parameter int unsigned SCAN_CNT_W      = 20,
  parameter int unsigned NET_M           = 32,
  parameter int unsigned NET_P           = 3
) (
  input  logic                     clk,
  // lab system
  input  logic                     btnC,
  input  logic                     btnU,
  output logic [15:0]              led,
  output logic [6:0]               seg,
  output logic [7:0]               an,
  // combinational network demo
  input  logic                     eotn_btnC,
  input  logic [15:0]              eotn_sw,
  output logic [6:0]               eotn_seg,
  output logic [7:0]               eotn_an,
  // iterative sorter
  input  logic                     iter_reset,
  input  logic [ITER_N*ITER_M-1:0] iter_input,
  output logic                     iter_ready,
  output logic [ITER_N*ITER_M-1:0] iter_sorted,
  // other network types
  input  logic [NET_M*(2**NET_P)-1:0] bubble_in,
  output logic [NET_M*(2**NET_P)-1:0] bubble_out,
  input  logic [NET_M*(2**NET_P)-1:0] oem_in,
  output logic [NET_M*(2**NET_P)-1:0] oem_out,
  input  logic [NET_M*(2**NET_P)-1:0] bitonic_in,
  output logic [NET_M*(2**NET_P)-1:0] bitonic_out
);

  lab2_hls_system #(
    .DEBOUNCE_CYCLES(DEBOUNCE_CYCLES),
    .SCAN_CNT_W     (SCAN_CNT_W)
  ) u_lab (
    .clk  (clk),
    .btn_c(btnC),
    .btn_u(btnU),
    .led  (led),
    .seg  (seg),
    .an   (an)
  );

  top_eotn #(.SCAN_CNT_W(SCAN_CNT_W)) u_eotn (
    .clk  (clk),
    .btn_c(eotn_btnC),
    .sw   (eotn_sw),
    .seg  (eotn_seg),
    .an   (eotn_an)
  );

  eo_iter_sorter #(.M(ITER_M), .N(ITER_N)) u_iter (
    .clk        (clk),
    .reset      (iter_reset),
    .ready      (iter_ready),
    .input_data (iter_input),
    .sorted_data(iter_sorted)
  );

  bubble_network #(.M(NET_M), .N(2**NET_P)) u_bubble (
    .data_in (bubble_in),
    .data_out(bubble_out)
  );

  oem_network #(.M(NET_M), .P(NET_P)) u_oem (
    .data_in (oem_in),
    .data_out(oem_out)
  );

  bitonic_network #(.M(NET_M), .P(NET_P)) u_bitonic (
    .data_in (bitonic_in),
    .data_out(bitonic_out)
  );

endmodule
