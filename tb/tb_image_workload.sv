// tb_image_workload -- compresses a whole synthetic grey-scale picture.
//
// A W x H picture of 8-bit pixels (smooth shading, a bright disc, stripes
// and a little noise) is cut into 8x8 blocks, blocks taken left to right
// and top to bottom, each block sent row by row as pixel - 128 with the
// enable held high. Every output coefficient is compared with a
// floating-point reference (scaled 2-D DCT from its definition, 13-bit
// range of the second 1-D DCT, quantizer table from its definition,
// zig-zag scan). The testbench reports the mean squared error against the
// unrounded reference and how many outputs equal the rounded reference,
// and checks: every output within one unit, mean squared error below 0.1,
// first coefficient in clock 124 and the last one of block k in clock
// 124 + 64k + 63 (one block per 64 clocks, no gaps).
module tb_image_workload;

  localparam int W = 64;
  localparam int H = 48;
  localparam int NBLK = (W / 8) * (H / 8);

  logic              clk = 1'b0;
  logic              clr, en;
  logic signed [7:0] data_in;
  logic signed [8:0] data_out;
  logic              rdy;
  int checks = 0, failures = 0;

  dct_quant_zigzag dut (.clk(clk), .clr(clr), .en(en), .data_in(data_in),
                        .data_out(data_out), .rdy(rdy));

  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979324;
  localparam int QSTD [64] = '{
    16, 11, 10, 16, 24, 40, 51, 61,   12, 12, 14, 19, 26, 58, 60, 55,
    14, 13, 16, 24, 40, 57, 69, 56,   14, 17, 22, 29, 51, 87, 80, 62,
    18, 22, 37, 56, 68,109,103, 77,   24, 35, 55, 64, 81,104,113, 92,
    49, 64, 78, 87,103,121,120,101,   72, 92, 95, 98,112,100,103, 99 };

  real s [8], qf [64];
  int  zz [64];
  int  pix [H][W];
  int  send_q [$];
  real expq [$];
  int  n_clamped;

  function automatic real cn(int n);
    return $cos(n * PI / 16.0);
  endfunction

  function automatic int round_away(real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  task automatic setup();
    int k, r, c;
    real v, dx, dy;
    s[0] = cn(4);         s[1] = cn(7) / cn(6); s[2] = cn(6) / cn(4); s[3] = cn(5) / cn(2);
    s[4] = cn(4);         s[5] = cn(3) / cn(2); s[6] = cn(2) / cn(4); s[7] = cn(1) / cn(6);
    for (int u = 0; u < 8; u++)
      for (int w = 0; w < 8; w++)
        qf[u*8+w] = $itor(round_away(s[u] * s[w] / (4.0 * QSTD[u*8+w]) * 4096.0)) / 4096.0;
    qf[6*8+5] = 19.0 / 4096.0;
    k = 0;
    for (int d = 0; d < 15; d++)
      for (int i = 0; i < 8; i++) begin
        r = (d % 2 == 0) ? d - i : i;
        c = d - r;
        if (r >= 0 && r < 8 && c >= 0 && c < 8) begin zz[k] = r * 8 + c; k++; end
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        dx = x - 40.0; dy = y - 20.0;
        v = 90.0 + 1.2 * x + 0.8 * y;                          // shading
        if (dx * dx + dy * dy < 120.0) v = v + 70.0;            // bright disc
        if (y > 32) v = v + 25.0 * $sin(x * 1.3);               // stripes
        v = v + $itor($urandom_range(0, 8)) - 4.0;              // noise
        pix[y][x] = (v < 0.0) ? 0 : (v > 255.0) ? 255 : $rtoi(v);
      end
  endtask

  task automatic add_block(input int by, input int bx);
    real acc, yv;
    real y [64];
    int  x [64];
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) x[r*8+c] = pix[by*8+r][bx*8+c] - 128;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        acc = 0.0;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++)
            acc += x[r*8+c] * $cos((2*r+1) * u * PI / 16.0) * $cos((2*c+1) * v * PI / 16.0);
        yv = acc * ((u == 0) ? cn(4) : 1.0) * ((v == 0) ? cn(4) : 1.0) / (s[u] * s[v]);
        // the second 1-D DCT delivers 13 bits
        if (yv > 4095.0)  begin yv = 4095.0;  n_clamped++; end
        if (yv < -4096.0) begin yv = -4096.0; n_clamped++; end
        y[u*8+v] = yv;
      end
    for (int i = 0; i < 64; i++) begin
      send_q.push_back(x[i]);
      expq.push_back(y[zz[i]] * qf[zz[i]]);
    end
  endtask

  int  ecnt, n_out, n_exact, n_timing;
  real sq_err;

  always @(posedge clk) begin
    real ev;
    if (!clr && en) begin
      ecnt <= ecnt + 1;
      if (rdy && expq.size() > 0) begin
        ev = expq.pop_front();
        checks++;
        if ($itor(data_out) - ev >= 1.0 || ev - $itor(data_out) >= 1.0) begin
          failures++;
          $display("FAIL: block %0d coefficient %0d = %0d, expected %f", n_out / 64, n_out % 64, data_out, ev);
        end
        if (data_out == 9'(round_away(ev))) n_exact++;
        sq_err += ($itor(data_out) - ev) * ($itor(data_out) - ev);
        // one coefficient per clock from clock 124 on
        checks++;
        if (ecnt + 1 != 124 + n_out) begin
          failures++; n_timing++;
          if (n_timing < 5) $display("FAIL: coefficient %0d in clock %0d, expected %0d", n_out, ecnt + 1, 124 + n_out);
        end
        n_out++;
      end
    end
  end

  initial begin
    setup();
    n_clamped = 0; ecnt = 0; n_out = 0; n_exact = 0; n_timing = 0; sq_err = 0.0;
    for (int by = 0; by < H / 8; by++)
      for (int bx = 0; bx < W / 8; bx++) add_block(by, bx);
    clr = 1'b1; en = 1'b0; data_in = '0;
    repeat (2) @(posedge clk);
    clr <= 1'b0;
    while (expq.size() > 0) begin
      @(posedge clk);
      en <= 1'b1;
      data_in <= (send_q.size() > 0) ? 8'(send_q.pop_front()) : 8'sd0;
    end
    @(posedge clk);
    en <= 1'b0;
    checks++;
    if (n_out != NBLK * 64) begin failures++; $display("FAIL: %0d outputs", n_out); end
    checks++;
    if (sq_err / n_out >= 0.1) begin failures++; $display("FAIL: MSE too large"); end
    $display("%0dx%0d picture, %0d blocks: %0d coefficients, %0d equal to the rounded reference, MSE %f, clamped DC/AC terms %0d",
             W, H, NBLK, n_out, n_exact, sq_err / n_out, n_clamped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 + 64 * NBLK + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
