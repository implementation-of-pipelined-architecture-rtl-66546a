// dct_controller -- sequencing of the DCT / quantizer / zig-zag pipeline.
//
// All timing is counted in clocks in which the pipeline enable en is high;
// with en low every counter holds. The controller
//  * enables the first 1-D DCT whenever en is high (en1);
//  * writes the transpose buffer from the first valid row coefficient on
//    (stat1), at a normal address that counts 0..127 (two 64-word halves);
//  * starts reading the transpose buffer when the write address reaches 65,
//    at the transposed address {half, column, row} of a second counter, and
//    enables the second 1-D DCT from that clock on (en2);
//  * from the second DCT's first valid coefficient (stat2) on, presents to
//    the quantizer ROM and the zig-zag buffer the position u*8+v of the
//    coefficient on the DCT output. The second DCT emits a block column by
//    column, so this position is the output count with its two 3-bit halves
//    swapped;
//  * starts reading the zig-zag buffer ZZ_DELAY writes after the first one,
//    via a running count into the zig-zag ROM, and raises rdy one clock
//    later, when the registered buffer output carries the coefficient.
// ZZ_DELAY = 29 is the smallest delay at which every coefficient has been
// written before the zig-zag scan asks for it (coefficient (6,0), zig-zag
// index 21, is written as the 49th of its block). The addressing sequences
// and the start of the transpose read follow the published description;
// the counters, the position swap and ZZ_DELAY are this design's reading of
// it. clr is synchronous and restarts everything.
//
// Immediate assertions check that no buffer word is read in the clock in
// which it is overwritten.
module dct_controller
  import jpeg_dct_pkg::*;
#(
  parameter int unsigned ZZ_DELAY = 29
) (
  input  logic      clk,
  input  logic      clr,
  input  logic      en,
  input  logic      stat1,
  input  logic      stat2,
  output logic      en1,
  output logic      en2,
  output logic      we_t,
  output buf_addr_t addr_in_t,
  output buf_addr_t addr_out_t,
  output pos_t      q_addr,
  output logic      we_z,
  output buf_addr_t addr_in_z,
  output logic      re_z,
  output buf_addr_t z_addr,
  output logic      rdy
);

  localparam buf_addr_t T_START = buf_addr_t'(64);             // last write before reading
  localparam buf_addr_t Z_START = buf_addr_t'(ZZ_DELAY - 1);

  buf_addr_t wcnt_t, rcnt_t, cnt_q, cnt_z;
  logic      run_t, run_z;

  assign en1  = en;
  assign we_t = en && stat1;
  assign en2  = en && run_t;
  assign we_z = en && stat2;
  assign re_z = en && run_z;

  assign addr_in_t  = wcnt_t;
  assign addr_out_t = {rcnt_t[6], rcnt_t[2:0], rcnt_t[5:3]};
  assign q_addr     = {cnt_q[2:0], cnt_q[5:3]};
  assign addr_in_z  = {cnt_q[6], q_addr};
  assign z_addr     = cnt_z;

  always_ff @(posedge clk) begin
    if (clr) begin
      wcnt_t <= '0;
      rcnt_t <= '0;
      cnt_q  <= '0;
      cnt_z  <= '0;
      run_t  <= 1'b0;
      run_z  <= 1'b0;
      rdy    <= 1'b0;
    end else begin
      if (we_t) begin
        wcnt_t <= wcnt_t + 1'b1;
        if (wcnt_t == T_START) run_t <= 1'b1;
      end
      if (en2) rcnt_t <= rcnt_t + 1'b1;
      if (we_z) begin
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == Z_START) run_z <= 1'b1;
      end
      if (re_z) cnt_z <= cnt_z + 1'b1;
      rdy <= re_z;
    end
  end

  // A word must never be read in the clock in which it is written.
  always_ff @(posedge clk) begin
    if (!clr && we_t && en2)
      assert (addr_in_t != addr_out_t)
        else $error("transpose buffer: read and write of word %0d in one clock", addr_in_t);
  end

endmodule
