// quantizer -- post-scales and quantizes one 2-D coefficient per clock.
//
// q_out = round( coef * Q(q_addr) / 2**SHIFT ), saturated to OUT_W bits,
// where Q comes from the quantizer ROM inside this block. One multiplier
// replaces both the DCT post-scaling and the division by the JPEG step.
// Rounding is to nearest with halves away from zero (matching a
// floating-point round()); saturation and the rounding mode are this
// design's choices, the widths (13-bit coefficient, 12-bit table value, 9-bit
// result) and the 2**12 table scale are the published ones.
//
// Interface and timing: purely combinational; the result is written into
// the zig-zag buffer in the same clock as coef leaves the second 1-D DCT.
module quantizer
  import jpeg_dct_pkg::*;
#(
  parameter int unsigned IN_W  = COL_W,
  parameter int unsigned OUT_W = ZZ_W,
  parameter int unsigned SHIFT = QSHIFT
) (
  input  logic signed [IN_W-1:0]  coef,
  input  pos_t                    q_addr,
  output logic signed [OUT_W-1:0] q_out
);

  localparam int unsigned PW = IN_W + QV_W + 1;
  typedef logic signed [PW-1:0] prod_t;

  localparam prod_t HALF = prod_t'(1) <<< (SHIFT - 1);
  localparam prod_t OMAX = (prod_t'(1) <<< (OUT_W - 1)) - prod_t'(1);

  qval_t q_value;
  prod_t prod, mag, qmag;

  quant_rom u_rom (
    .q_addr (q_addr),
    .q_value(q_value)
  );

  always_comb begin
    prod = prod_t'(coef) * prod_t'({1'b0, q_value});
    mag  = (prod < 0) ? -prod : prod;
    qmag = (mag + HALF) >>> SHIFT;
    if (qmag > OMAX) qmag = OMAX + ((prod < 0) ? prod_t'(1) : prod_t'(0));
    q_out = (prod < 0) ? OUT_W'(-qmag) : OUT_W'(qmag);
  end

endmodule
