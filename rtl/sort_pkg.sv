// sort_pkg: constants and types shared by the parallel sorting designs.
//
// The default sizes are those of the lab system: sixteen 8-bit items
// (a 128-bit data word). The item-to-word packing used everywhere is
// "item i occupies bits [i*M +: M]"; all sorters in this library leave the
// largest item in slice 0 (least significant) and the smallest in slice N-1,
// so the packed word read as a hexadecimal number shows the items in
// ascending order from left to right.
//
// The ROM contents are this library's own test vector (sixteen distinct bytes
// in no particular order); the original lab read its data from a file that is
// not reproduced here.
package sort_pkg;

  // Lab-system item width and item count.
  localparam int unsigned LAB_M = 8;
  localparam int unsigned LAB_N = 16;

  // States of the unroll controller (ROM-to-register loader).
  typedef enum logic [1:0] {
    UC_INIT,
    UC_READ,
    UC_WRITE,
    UC_FINISH
  } unroll_state_t;

  // States of the block-level (ap_ctrl_hs) sorter.
  typedef enum logic [1:0] {
    HS_IDLE,
    HS_SORT,
    HS_DONE
  } hs_state_t;

  // Contents of the 16 x 8 data ROM: ROM_DATA[a] is the byte at address a.
  localparam logic [7:0] ROM_DATA [16] = '{
    8'h5A, 8'h03, 8'hC7, 8'h81, 8'h2E, 8'hF0, 8'h19, 8'h64,
    8'hB2, 8'h0D, 8'h97, 8'h40, 8'hE5, 8'h7B, 8'h26, 8'hA8
  };

endpackage
