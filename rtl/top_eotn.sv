// top_eotn: board demonstration of the combinational even-odd transition
// network, sorting eight 4-bit values and showing them on eight digits.
//
// The 32-bit test word is built from the sixteen switches and a constant:
// with btn_c released it is {sw, 16'hFEDC}, with btn_c pressed it is
// {16'h1234, sw}. Item i of the word is its nibble i. The sorted word goes to
// eight hexadecimal decoders; nibble 7 is shown on the leftmost digit and
// nibble 0 on the rightmost, so the display reads the values in ascending
// order from left to right. The sort is combinational (8 comparator levels,
// 28 comparators); only the display scan uses the clock.
//
// Test-word construction, sizes and wiring follow the lecture's demo; the
// display driver and decoder internals are this design's own.
module top_eotn #(
  parameter int unsigned SCAN_CNT_W = 20   // display scan counter width
) (
  input  logic        clk,
  input  logic        btn_c,
  input  logic [15:0] sw,
  output logic [6:0]  seg,
  output logic [7:0]  an
);

  logic [31:0] test_data, result;
  logic [6:0]  hex [8];

  assign test_data = btn_c ? {16'h1234, sw} : {sw, 16'hFEDC};

  eot_network #(.M(4), .P(3)) u_sorting_network (
    .data_in (test_data),
    .data_out(result)
  );

  for (genvar i = 0; i < 8; i++) begin : g_dec
    bin7seg_decoder u_dec (
      .bin_input(result[i*4 +: 4]),
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
