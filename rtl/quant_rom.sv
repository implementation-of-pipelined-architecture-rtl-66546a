// quant_rom -- quantizing and post-scaling table, 64 words of 12 bits.
//
// The DCT stages produce scaled coefficients Y'(u,v); the true coefficient
// is s_u*s_v*Y'(u,v) with s the 1-D post-scale vector. Quantization divides
// by the JPEG luminance step q(u,v). Both are folded into one multiplier:
//   Q(u,v) = round( s_u * s_v / (4 * q(u,v)) * 4096 )
// (the factor 4 brings this DCT's scaling to the JPEG definition). The
// quantizer multiplies by Q and divides by 4096. Entry (6,5) deliberately
// holds 19, a modified step, where the formula with the standard step gives
// 10; all other entries follow the formula.
//
// The 64 values and the 6-bit address / 12-bit word are the published ones;
// the formula above is how they relate to the JPEG table.
//
// Interface: combinational read; q_addr is the coefficient position u*8+v
// with u the vertical and v the horizontal frequency.
module quant_rom
  import jpeg_dct_pkg::*;
(
  input  pos_t  q_addr,
  output qval_t q_value
);

  localparam qval_t QTAB [64] = '{
    12'd32, 12'd34, 12'd39, 12'd27, 12'd21, 12'd16, 12'd19, 12'd30,
    12'd31, 12'd22, 12'd20, 12'd17, 12'd14, 12'd8,  12'd11, 12'd24,
    12'd28, 12'd22, 12'd19, 12'd14, 12'd10, 12'd9,  12'd10, 12'd25,
    12'd31, 12'd18, 12'd15, 12'd13, 12'd9,  12'd6,  12'd10, 12'd25,
    12'd28, 12'd17, 12'd11, 12'd8,  12'd8,  12'd6,  12'd9,  12'd24,
    12'd27, 12'd13, 12'd9,  12'd9,  12'd8,  12'd8,  12'd11, 12'd26,
    12'd19, 12'd11, 12'd9,  12'd9,  12'd9,  12'd19, 12'd15, 12'd34,
    12'd26, 12'd15, 12'd15, 12'd16, 12'd17, 12'd24, 12'd33, 12'd68
  };

  assign q_value = QTAB[q_addr];

endmodule
