// two_plane_addr_map: logical-to-physical row mapping for two-plane addressing.
//
// A two-plane command needs two pages with the same page number in two blocks
// whose block-address bit 0 differs. With the plain row layout
// {block[11:1], block[0], page[6:0]} two consecutive row numbers are consecutive
// pages of one block and never form such a pair. This mapping reads the logical
// row as {block[11:1], page[6:0], block[0]}, i.e. it rotates the 8-bit
// {block[0], page} field left by one, so that every even/odd pair of
// consecutive logical rows lands on the same page of blocks 2k and 2k+1 (one in
// each plane). The die bit and block[11:1] pass unchanged.
//
// The rotation and its place in the interface controller follow the document;
// the die bit above the block field is this design's choice (see nand_pkg).
// Purely combinational, zero latency: it is only wiring, so it has no cells
// after synthesis and every output comes straight from an input.
module two_plane_addr_map
  import nand_pkg::*;
#(
  parameter int unsigned PW = PAGE_W,   // page field width
  parameter int unsigned RW = ROW_W     // row width including the die bit
) (
  input  logic [RW-1:0] logical_row,
  output logic [RW-1:0] physical_row
);

  always_comb begin
    physical_row = logical_row;
    // physical {block[0], page} = rotate-right of logical {page, block[0]}
    physical_row[PW]     = logical_row[0];
    physical_row[PW-1:0] = logical_row[PW:1];
  end

endmodule
