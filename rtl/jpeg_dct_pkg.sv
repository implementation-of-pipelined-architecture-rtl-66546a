// jpeg_dct_pkg -- widths and types shared by the DCT / quantizer / zig-zag
// pipeline.
//
// The datapath narrows and widens along the chain: 8-bit samples enter the
// first 1-D DCT, 11-bit row coefficients pass through the transpose buffer,
// 13-bit scaled 2-D coefficients leave the second 1-D DCT, 12-bit table
// values scale them, and 9-bit quantized coefficients are stored in the
// zig-zag buffer and sent out. Both buffers use 7-bit addresses: two 64-word
// halves that are written and read in turn. These widths are the published
// ones; the type names are this design's.
package jpeg_dct_pkg;

  localparam int unsigned PIX_W  = 8;   // input sample
  localparam int unsigned ROW_W  = 11;  // first 1-D DCT output / transpose buffer word
  localparam int unsigned COL_W  = 13;  // second 1-D DCT output
  localparam int unsigned QV_W   = 12;  // quantizer ROM word
  localparam int unsigned QSHIFT = 12;  // quantizer table is scaled by 2**QSHIFT
  localparam int unsigned ZZ_W   = 9;   // quantized coefficient / zig-zag buffer word
  localparam int unsigned BUF_AW = 7;   // buffer address: {half, index 0..63}

  typedef logic signed [PIX_W-1:0] pix_t;
  typedef logic signed [ROW_W-1:0] row_coef_t;
  typedef logic signed [COL_W-1:0] col_coef_t;
  typedef logic        [QV_W-1:0]  qval_t;
  typedef logic signed [ZZ_W-1:0]  zz_coef_t;
  typedef logic        [BUF_AW-1:0] buf_addr_t;
  typedef logic        [5:0]       pos_t;   // position in an 8x8 block, row*8+col

endpackage
