// tb_dct1d -- self-checking test of the serial 1-D scaled DCT.
//
// Two instances run side by side with the widths of the two pipeline
// stages: 8-bit samples to 11-bit coefficients and 11-bit to 13-bit. Rows
// of random samples (and a few rows chosen to drive y'1 past the output
// range) are streamed with the enable dropped at random. The reference for
// each row is computed here in floating point from the DCT definition,
//   y'_k = k_k * sum_n x_n cos((2n+1) k pi / 16) / s_k,
// clamped to the output range. Each coefficient must lie within a small
// tolerance of it (the fixed-point constants and the rounding of the
// first stage's result allow a fraction of a unit; the wider stage sees
// larger operands). The testbench also checks the published timing: with
// the enable held high, the first coefficient leaves in clock 15 and stat
// rises in that clock, not before.
module tb_dct1d;

  localparam int ROWS = 300;

  logic clk = 1'b0;
  logic clr, en;
  logic signed [7:0]  din_a;
  logic signed [10:0] dout_a;
  logic signed [10:0] din_b;
  logic signed [12:0] dout_b;
  logic stat_a, stat_b;

  int checks = 0, failures = 0;

  dct1d #(.IN_W(8), .OUT_W(11)) dut_a (
    .clk(clk), .clr(clr), .en(en), .din(din_a), .dout(dout_a), .stat(stat_a));
  dct1d #(.IN_W(11), .OUT_W(13)) dut_b (
    .clk(clk), .clr(clr), .en(en), .din(din_b), .dout(dout_b), .stat(stat_b));

  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979324;
  real s [8];
  int  xa_q [$], xb_q [$];
  real ea_q [$], eb_q [$];
  int  n_exact_a, n_exact_b, n_sat, n_stall;

  function automatic real cn(int n);
    return $cos(n * PI / 16.0);
  endfunction

  function automatic real clampr(real v, int w);
    real hi, lo;
    hi = $itor((1 << (w - 1)) - 1);
    lo = -$itor(1 << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  task automatic add_row(input int x [8], input int w_out, input bit to_b);
    real acc, y;
    for (int k = 0; k < 8; k++) begin
      acc = 0.0;
      for (int n = 0; n < 8; n++) acc += x[n] * $cos((2*n+1) * k * PI / 16.0);
      y = ((k == 0) ? cn(4) : 1.0) * acc / s[k];
      if (y > $itor((1 << (w_out - 1)) - 1)) n_sat++;
      if (to_b) eb_q.push_back(clampr(y, w_out)); else ea_q.push_back(clampr(y, w_out));
    end
    for (int n = 0; n < 8; n++)
      if (to_b) xb_q.push_back(x[n]); else xa_q.push_back(x[n]);
  endtask

  // monitor
  int ecnt, na, nb;
  always @(posedge clk) begin
    real ev;
    if (!clr && en) begin
      ecnt <= ecnt + 1;
      // timing: stat must be low through clock 14 and high in clock 15
      if (ecnt + 1 <= 15) begin
        checks++;
        if (stat_a != (ecnt + 1 == 15) || stat_b != (ecnt + 1 == 15)) begin
          failures++;
          $display("FAIL: stat %0d/%0d in enabled clock %0d", stat_a, stat_b, ecnt + 1);
        end
      end
      if (stat_a && ea_q.size() > 0) begin
        ev = ea_q.pop_front();
        checks++;
        if ($itor(dout_a) - ev > 0.75 || ev - $itor(dout_a) > 0.75) begin
          failures++;
          $display("FAIL: 8->11 coefficient %0d = %0d, expected %f", na, dout_a, ev);
        end
        if ($itor(dout_a) - ev <= 0.5 && ev - $itor(dout_a) <= 0.5) n_exact_a++;
        na++;
      end
      if (stat_b && eb_q.size() > 0) begin
        ev = eb_q.pop_front();
        checks++;
        if ($itor(dout_b) - ev > 1.5 || ev - $itor(dout_b) > 1.5) begin
          failures++;
          $display("FAIL: 11->13 coefficient %0d = %0d, expected %f", nb, dout_b, ev);
        end
        if ($itor(dout_b) - ev <= 0.5 && ev - $itor(dout_b) <= 0.5) n_exact_b++;
        nb++;
      end
    end
    if (!en && !clr) n_stall++;
  end

  initial begin
    int x [8];
    int pen;
    s[0] = cn(4);         s[1] = cn(7) / cn(6); s[2] = cn(6) / cn(4); s[3] = cn(5) / cn(2);
    s[4] = cn(4);         s[5] = cn(3) / cn(2); s[6] = cn(2) / cn(4); s[7] = cn(1) / cn(6);
    ecnt = 0; na = 0; nb = 0; n_exact_a = 0; n_exact_b = 0; n_sat = 0; n_stall = 0;

    for (int r = 0; r < ROWS; r++) begin
      for (int n = 0; n < 8; n++) x[n] = int'($urandom_range(0, 255)) - 128;
      if (r % 50 == 7)   // row that follows the k=1 basis: y'1 = 1282 > 1023
        for (int n = 0; n < 8; n++) x[n] = (n < 4) ? 127 : -128;
      add_row(x, 11, 1'b0);
      // second stage: 11-bit samples within the range the first stage gives
      for (int n = 0; n < 8; n++) x[n] = int'($urandom_range(0, 1400)) - 700;
      if (r % 50 == 9)   // DC sum past 4095
        for (int n = 0; n < 8; n++) x[n] = 1000;
      add_row(x, 13, 1'b1);
    end

    clr = 1'b1; en = 1'b0; din_a = '0; din_b = '0;
    repeat (2) @(posedge clk);
    clr <= 1'b0;
    // first 40 clocks with en high to check the published timing, then stalls
    for (int c = 0; ea_q.size() > 0 || eb_q.size() > 0; c++) begin
      pen = (c < 40) ? 0 : 20;
      @(posedge clk);
      if ($urandom_range(0, 99) < pen) begin
        en <= 1'b0;
        din_a <= 8'($urandom); din_b <= 11'($urandom);
      end else begin
        en <= 1'b1;
        din_a <= (xa_q.size() > 0) ? 8'(xa_q.pop_front())  : 8'sd0;
        din_b <= (xb_q.size() > 0) ? 11'(xb_q.pop_front()) : 11'sd0;
      end
    end
    @(posedge clk);
    en <= 1'b0;
    @(posedge clk);

    checks++;
    if (na != ROWS * 8 || nb != ROWS * 8) begin
      failures++; $display("FAIL: %0d / %0d coefficients seen", na, nb);
    end
    checks++;
    if (n_sat == 0 || n_stall == 0) begin
      failures++; $display("FAIL: saturation %0d or stalls %0d never exercised", n_sat, n_stall);
    end
    $display("rounded-exact: 8->11 %0d of %0d, 11->13 %0d of %0d; saturating coefficients %0d; stall clocks %0d",
             n_exact_a, na, n_exact_b, nb, n_sat, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
