// dct_quant_zigzag -- pipelined 2-D DCT, quantizer and zig-zag reorder for
// JPEG baseline compression of grey-scale images.
//
// Samples of 8x8 blocks enter one per clock on an 8-bit port. A first
// serial 1-D DCT transforms each row, a transpose buffer turns rows into
// columns, a second 1-D DCT transforms the columns, a single multiplier
// applies the combined post-scale and quantization factor, and a zig-zag
// buffer sends the 64 quantized coefficients of the block out in zig-zag
// order, one per clock. The DCTs compute the scaled (Arai) transform, so
// the post-scale costs nothing: it is folded into the quantizer table.
//
//   data_in -> dct1d(8->11) -> transpose_buffer -> dct1d(11->13)
//           -> quantizer(13->9) -> zigzag_buffer -> data_out
//                 all sequenced by dct_controller
//
// Interface:
//   clk, clr  clock and synchronous active-high clear.
//   en        pipeline advance: in a clock with en high one sample is taken
//             and everything moves one step; with en low everything holds.
//   data_in   sample minus 128 (two's complement), blocks back to back, each
//             block row by row, left to right.
//   data_out  quantized coefficient (two's complement), zig-zag order.
//   rdy       high for one clock with each new data_out.
// Timing, counting enabled clocks from the first sample of the first block
// as clock 1: the second 1-D DCT emits its first coefficient in clock 94 and
// the first output coefficient is on data_out (with rdy) in clock 124; from
// then on one coefficient leaves per enabled clock, 64 per block. Nothing
// drains the pipeline by itself: the last block leaves while en stays high
// for another 123 clocks, with any data_in.
// The structure, widths and stage timing follow the published architecture;
// the en/rdy protocol, the level-shifted input and the clear are this
// design's choices.
module dct_quant_zigzag
  import jpeg_dct_pkg::*;
(
  input  logic     clk,
  input  logic     clr,
  input  logic     en,
  input  pix_t     data_in,
  output zz_coef_t data_out,
  output logic     rdy
);

  logic      en1, en2, stat1, stat2, we_t, we_z, re_z;
  buf_addr_t addr_in_t, addr_out_t, addr_in_z, z_addr, addr_out_z;
  pos_t      q_addr;
  row_coef_t row_coef, col_in;
  col_coef_t col_coef;
  zz_coef_t  q_coef;

  dct_controller u_ctrl (
    .clk       (clk),
    .clr       (clr),
    .en        (en),
    .stat1     (stat1),
    .stat2     (stat2),
    .en1       (en1),
    .en2       (en2),
    .we_t      (we_t),
    .addr_in_t (addr_in_t),
    .addr_out_t(addr_out_t),
    .q_addr    (q_addr),
    .we_z      (we_z),
    .addr_in_z (addr_in_z),
    .re_z      (re_z),
    .z_addr    (z_addr),
    .rdy       (rdy)
  );

  dct1d #(.IN_W(PIX_W), .OUT_W(ROW_W)) u_dct_row (
    .clk (clk),
    .clr (clr),
    .en  (en1),
    .din (data_in),
    .dout(row_coef),
    .stat(stat1)
  );

  transpose_buffer #(.DATA_W(ROW_W), .ADDR_W(BUF_AW)) u_tbuf (
    .clk     (clk),
    .we      (we_t),
    .addr_in (addr_in_t),
    .data_in (row_coef),
    .addr_out(addr_out_t),
    .data_out(col_in)
  );

  dct1d #(.IN_W(ROW_W), .OUT_W(COL_W)) u_dct_col (
    .clk (clk),
    .clr (clr),
    .en  (en2),
    .din (col_in),
    .dout(col_coef),
    .stat(stat2)
  );

  quantizer u_quant (
    .coef  (col_coef),
    .q_addr(q_addr),
    .q_out (q_coef)
  );

  zigzag_rom u_zzrom (
    .z_addr  (z_addr),
    .addr_out(addr_out_z)
  );

  zigzag_buffer #(.DATA_W(ZZ_W), .ADDR_W(BUF_AW)) u_zbuf (
    .clk     (clk),
    .clr     (clr),
    .we      (we_z),
    .addr_in (addr_in_z),
    .data_in (q_coef),
    .re      (re_z),
    .addr_out(addr_out_z),
    .data_out(data_out)
  );

  // The zig-zag read must never hit the word being written in that clock.
  always_ff @(posedge clk) begin
    if (!clr && we_z && re_z)
      assert (addr_in_z != addr_out_z)
        else $error("zig-zag buffer: read and write of word %0d in one clock", addr_in_z);
  end

endmodule
