// zigzag_rom -- read-address generator of the zig-zag buffer.
//
// The controller counts z_addr up by one per output coefficient. The low six
// bits are the index in the zig-zag scan; the ROM returns the row-major
// position (row*8 + column) of that coefficient, so index 1 is (0,1),
// index 2 is (1,0), index 3 is (2,0) and so on to index 63 at (7,7). The top
// bit selects the buffer half and passes through unchanged (this design's
// choice; the published ROM is addressed with 7 bits).
//
// Interface: combinational, 7-bit address in, 7-bit buffer address out.
module zigzag_rom
  import jpeg_dct_pkg::*;
(
  input  buf_addr_t z_addr,
  output buf_addr_t addr_out
);

  localparam pos_t ZZ [64] = '{
     0,  1,  8, 16,  9,  2,  3, 10,
    17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34,
    27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36,
    29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46,
    53, 60, 61, 54, 47, 55, 62, 63
  };

  assign addr_out = {z_addr[6], ZZ[z_addr[5:0]]};

endmodule
