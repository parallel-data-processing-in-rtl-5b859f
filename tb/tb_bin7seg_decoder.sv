// tb_bin7seg_decoder: all sixteen digits. The expected patterns are written
// as the list of lit segments per digit and converted to active-low bits.
module tb_bin7seg_decoder;
  logic [3:0] bin;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  bin7seg_decoder dut (.bin_input(bin), .dec_out_n(seg_n));

  function automatic logic [6:0] to_bits(string s);
    logic [6:0] b = '1;
    for (int i = 0; i < s.len(); i++) b[s[i] - "a"] = 1'b0;
    return b;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      bin = 4'(d);
      #1 checks++;
      if (seg_n !== to_bits(lit[d])) begin
        failures++;
        $display("FAIL digit %h -> %b expected %b", d, seg_n, to_bits(lit[d]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
