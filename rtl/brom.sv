// brom: dual-port read-only memory, 2**ADDR_W words of DATA_W bits, holding
// the items the lab system sorts.
//
// Each port has its own clock, enable and address; when the enable is high
// the word at the address appears on the output after the rising clock edge
// (one clock of read latency, like an FPGA block ROM). The contents are
// sort_pkg::ROM_DATA, a fixed 16-byte test vector of this design.
//
// Ports and sizes (4-bit addresses, 8-bit data) follow the lab system's block
// diagram; the contents and the registered read are this design's choices.
module brom
  import sort_pkg::*;
#(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clka,
  input  logic              ena,
  input  logic [ADDR_W-1:0] addra,
  output logic [DATA_W-1:0] douta,
  input  logic              clkb,
  input  logic              enb,
  input  logic [ADDR_W-1:0] addrb,
  output logic [DATA_W-1:0] doutb
);

  localparam int unsigned DEPTH = 2**ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  // Fill the array from the package table, repeating it if the ROM is larger.
  initial begin
    for (int unsigned a = 0; a < DEPTH; a++)
      mem[a] = DATA_W'(ROM_DATA[a % 16]);
  end

  always_ff @(posedge clka) begin
    if (ena) douta <= mem[addra];
  end

  always_ff @(posedge clkb) begin
    if (enb) doutb <= mem[addrb];
  end

endmodule
