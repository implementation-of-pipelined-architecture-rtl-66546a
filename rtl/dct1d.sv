// dct1d -- serial-in, serial-out 8-point scaled 1-D DCT.
//
// Computes y' = C x, the Arai-Agostini-Naito "scaled" DCT: the true DCT
// coefficient is y_k = s_k * y'_k with s = [c4, c7/c6, c6/c4, c5/c2, c4,
// c3/c2, c2/c4, c1/c6] and cn = cos(n*pi/16). The post-scale is not applied
// here; the quantizer table absorbs it. The six add/multiply steps are
//   1: a = butterflies of x        4: e = d times m1..m4 (five multipliers)
//   2: b = butterflies of a        5: f = butterflies of e
//   3: d = butterflies of b        6: y' = butterflies of f
// with m1 = c4, m2 = c6, m3 = c2 - c6, m4 = c2 + c6, exactly as published.
//
// Timing (counting clocks in which en is high): samples x0..x7 of a row are
// shifted in on clocks 1-8 (din -> x[7] -> ... -> x[0]). Step 1 works on
// clock 9 from the full input register while that register already takes
// x0 of the next row, steps 2-6 follow on clocks 10-14, and step 6 loads an
// output shift register from which y'0 appears on dout in clock 15 and y'7 in
// clock 22. Rows follow back to back, one sample in and one coefficient out
// per clock; a row takes 22 clocks from first sample to last coefficient.
// stat rises with the first y'0 and stays high: it tells the controller
// that dout is carrying coefficients. With en low every register holds.
//
// Design choices not fixed by the published description: the constants are
// held with FRAC fractional bits; steps 4-6 keep those fractional bits and
// the result is rounded (halves up) once, at the output; results outside the
// OUT_W range saturate; clr is synchronous. The step registers load on every
// enabled clock; only the loads that follow a complete row reach the output.
module dct1d #(
  parameter int unsigned IN_W  = 8,   // sample width (11 in the second instance)
  parameter int unsigned OUT_W = 11,  // coefficient width (13 in the second instance)
  parameter int unsigned FRAC  = 12   // fractional bits of m1..m4
) (
  input  logic                    clk,
  input  logic                    clr,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    stat
);

  // Steps 1-3 are additions only: three bits of growth.
  localparam int unsigned DW = IN_W + 3;
  // From step 4 on: fractional bits, one bit for m4 > 1, two more for steps 5-6.
  localparam int unsigned EW = IN_W + FRAC + 6;
  localparam int unsigned KW = FRAC + 2;

  typedef logic signed [DW-1:0]   dw_t;
  typedef logic signed [EW-1:0]   ew_t;
  typedef logic signed [KW-1:0]   k_t;
  typedef logic signed [OUT_W-1:0] out_t;

  localparam real SCALE = 2.0 ** FRAC;
  localparam k_t KM1 = k_t'($rtoi(0.70710678118654752 * SCALE + 0.5));  // cos(4pi/16)
  localparam k_t KM2 = k_t'($rtoi(0.38268343236508985 * SCALE + 0.5));  // cos(6pi/16)
  localparam k_t KM3 = k_t'($rtoi(0.54119610014619698 * SCALE + 0.5));  // cos(2pi/16)-cos(6pi/16)
  localparam k_t KM4 = k_t'($rtoi(1.30656296487637652 * SCALE + 0.5));  // cos(2pi/16)+cos(6pi/16)

  localparam ew_t HALF = ew_t'(1) <<< (FRAC - 1);
  localparam ew_t OMAX = (ew_t'(1) <<< (OUT_W - 1)) - ew_t'(1);
  localparam ew_t OMIN = -OMAX - ew_t'(1);

  logic signed [IN_W-1:0] x [8];     // input shift register
  dw_t  a [8], b [8], d [9];         // step 1-3 registers
  ew_t  e [9], f [8];                // step 4-5 registers
  out_t yq [8];                      // output shift register
  logic [2:0] ph;                    // position within the 8-clock frame
  logic [3:0] lat;                   // clocks since clear, saturating at 14

  dw_t  na [8], nb [8], nd [9];
  ew_t  ne [9], nf [8], ny [8];
  out_t nyq [8];

  function automatic ew_t mulk(dw_t v, k_t k);
    return ew_t'(v) * ew_t'(k);
  endfunction

  function automatic ew_t frac_of(dw_t v);
    return ew_t'(v) <<< FRAC;
  endfunction

  function automatic out_t round_sat(ew_t v);
    ew_t r;
    r = (v + HALF) >>> FRAC;
    if (r > OMAX)      return out_t'(OMAX);
    else if (r < OMIN) return out_t'(OMIN);
    else               return out_t'(r);
  endfunction

  always_comb begin
    // Step 1
    na[0] = dw_t'(x[0]) + dw_t'(x[7]);
    na[1] = dw_t'(x[1]) + dw_t'(x[6]);
    na[2] = dw_t'(x[3]) - dw_t'(x[4]);
    na[3] = dw_t'(x[1]) - dw_t'(x[6]);
    na[4] = dw_t'(x[2]) + dw_t'(x[5]);
    na[5] = dw_t'(x[3]) + dw_t'(x[4]);
    na[6] = dw_t'(x[2]) - dw_t'(x[5]);
    na[7] = dw_t'(x[0]) - dw_t'(x[7]);
    // Step 2
    nb[0] = a[0] + a[5];
    nb[1] = a[1] - a[4];
    nb[2] = a[2] + a[6];
    nb[3] = a[1] + a[4];
    nb[4] = a[0] - a[5];
    nb[5] = a[3] + a[7];
    nb[6] = a[3] + a[6];
    nb[7] = a[7];
    // Step 3
    nd[0] = b[0] + b[3];
    nd[1] = b[0] - b[3];
    nd[2] = b[2];
    nd[3] = b[1] + b[4];
    nd[4] = b[2] - b[5];
    nd[5] = b[4];
    nd[6] = b[5];
    nd[7] = b[6];
    nd[8] = b[7];
    // Step 4: the five constant multiplications
    ne[0] = frac_of(d[0]);
    ne[1] = frac_of(d[1]);
    ne[2] = mulk(d[2], KM3);
    ne[3] = mulk(d[7], KM1);
    ne[4] = mulk(d[6], KM4);
    ne[5] = frac_of(d[5]);
    ne[6] = mulk(d[3], KM1);
    ne[7] = mulk(d[4], KM2);
    ne[8] = frac_of(d[8]);
    // Step 5
    nf[0] = e[0];
    nf[1] = e[1];
    nf[2] = e[5] + e[6];
    nf[3] = e[5] - e[6];
    nf[4] = e[3] + e[8];
    nf[5] = e[8] - e[3];
    nf[6] = e[2] + e[7];
    nf[7] = e[4] + e[7];
    // Step 6
    ny[0] = f[0];
    ny[1] = f[4] + f[7];
    ny[2] = f[2];
    ny[3] = f[5] - f[6];
    ny[4] = f[1];
    ny[5] = f[5] + f[6];
    ny[6] = f[3];
    ny[7] = f[4] - f[7];
    for (int k = 0; k < 8; k++) nyq[k] = round_sat(ny[k]);
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      ph  <= '0;
      lat <= '0;
      for (int i = 0; i < 8; i++) begin
        x[i] <= '0; a[i] <= '0; b[i] <= '0; f[i] <= '0; yq[i] <= '0;
      end
      for (int i = 0; i < 9; i++) begin
        d[i] <= '0; e[i] <= '0;
      end
    end else if (en) begin
      for (int i = 0; i < 7; i++) x[i] <= x[i+1];
      x[7] <= din;
      a <= na;
      b <= nb;
      d <= nd;
      e <= ne;
      f <= nf;
      // Step 6 of a complete row happens on the sixth clock of the next frame.
      if (ph == 3'd5) begin
        yq <= nyq;
      end else begin
        for (int i = 0; i < 7; i++) yq[i] <= yq[i+1];
        yq[7] <= '0;
      end
      ph <= ph + 3'd1;
      if (lat != 4'd14) lat <= lat + 4'd1;
    end
  end

  assign dout = yq[0];
  assign stat = (lat == 4'd14);

endmodule
