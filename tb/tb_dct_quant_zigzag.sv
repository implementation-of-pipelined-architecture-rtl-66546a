// tb_dct_quant_zigzag -- end-to-end test of the DCT / quantizer / zig-zag
// pipeline at its default parameters.
//
// Blocks of several kinds (a smooth synthetic grey-scale picture, random
// texture, flat blocks, sharp edges) are streamed through the design. For
// every block the expected output is computed here in floating point
// straight from the DCT definition: the scaled coefficient
//   Y'(u,v) = sum_rc x(r,c) k_u k_v cos((2r+1)u pi/16) cos((2c+1)v pi/16) / (s_u s_v)
// (k_0 = cos(pi/4), k_else = 1), times the quantizer factor built from the
// standard JPEG luminance table, in a zig-zag order generated by walking
// the anti-diagonals. Each output must lie within one unit of that real
// value; the testbench also counts how often it equals the rounded value
// and reports the mean squared error against the unrounded one.
//
// Phase A runs with en always high and checks the latency (first
// coefficient in enabled clock 124) and that the output then runs without a
// gap. Phase B clears the design and streams more blocks with en dropped at
// random (pipeline stalls). The testbench counts the mechanisms it must
// see: stalls, use of both halves of each buffer, the clear, saturation-free
// back-to-back blocks; one that never happened is a failure.
module tb_dct_quant_zigzag;

  localparam int NA = 6;            // blocks in phase A
  localparam int NB = 10;           // blocks in phase B
  localparam int FLUSH = 2;         // zero blocks that push the last block out

  logic              clk = 1'b0;
  logic              clr;
  logic              en;
  logic signed [7:0] data_in;
  logic signed [8:0] data_out;
  logic              rdy;

  int checks = 0, failures = 0;

  dct_quant_zigzag dut (
    .clk     (clk),
    .clr     (clr),
    .en      (en),
    .data_in (data_in),
    .data_out(data_out),
    .rdy     (rdy)
  );

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- model
  localparam real PI = 3.14159265358979324;
  localparam int QSTD [64] = '{
    16, 11, 10, 16, 24, 40, 51, 61,   12, 12, 14, 19, 26, 58, 60, 55,
    14, 13, 16, 24, 40, 57, 69, 56,   14, 17, 22, 29, 51, 87, 80, 62,
    18, 22, 37, 56, 68,109,103, 77,   24, 35, 55, 64, 81,104,113, 92,
    49, 64, 78, 87,103,121,120,101,   72, 92, 95, 98,112,100,103, 99 };

  real s [8];
  real qf [64];          // quantizer factor Q(u,v)/4096
  int  zz [64];          // zig-zag index -> row-major position
  real expq [$];         // expected outputs, unrounded
  int  blocks_q [$];     // samples to send

  function automatic real cn(int n);
    return $cos(n * PI / 16.0);
  endfunction

  function automatic int round_away(real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  task automatic build_tables();
    int k, r, c;
    s[0] = cn(4);         s[1] = cn(7) / cn(6); s[2] = cn(6) / cn(4); s[3] = cn(5) / cn(2);
    s[4] = cn(4);         s[5] = cn(3) / cn(2); s[6] = cn(2) / cn(4); s[7] = cn(1) / cn(6);
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++)
        qf[u*8+v] = $itor(round_away(s[u] * s[v] / (4.0 * QSTD[u*8+v]) * 4096.0)) / 4096.0;
    qf[6*8+5] = 19.0 / 4096.0;   // the one modified table entry
    // zig-zag: walk anti-diagonals, alternating direction
    k = 0;
    for (int dsum = 0; dsum < 15; dsum++) begin
      for (int i = 0; i < 8; i++) begin
        r = (dsum % 2 == 0) ? dsum - i : i;
        c = dsum - r;
        if (r >= 0 && r < 8 && c >= 0 && c < 8) begin
          zz[k] = r * 8 + c;
          k++;
        end
      end
    end
  endtask

  task automatic add_block(input int x [64]);
    real y [64];
    real acc, ku, kv;
    for (int u = 0; u < 8; u++) begin
      for (int v = 0; v < 8; v++) begin
        acc = 0.0;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++)
            acc += x[r*8+c] * $cos((2*r+1) * u * PI / 16.0) * $cos((2*c+1) * v * PI / 16.0);
        ku = (u == 0) ? cn(4) : 1.0;
        kv = (v == 0) ? cn(4) : 1.0;
        y[u*8+v] = acc * ku * kv / (s[u] * s[v]);
      end
    end
    for (int i = 0; i < 64; i++) begin
      blocks_q.push_back(x[i]);
      expq.push_back(y[zz[i]] * qf[zz[i]]);
    end
  endtask

  // Block of kind 0 smooth picture, 1 random texture, 2 flat, 3 edge.
  task automatic make_block(input int kind, input int idx);
    int x [64];
    int base, lvl;
    base = int'($urandom_range(0, 100)) - 50;
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) begin
        case (kind)
          0: lvl = $rtoi(40.0 * $sin((r + 8 * idx) * 0.21) + 20.0 * $cos(c * 0.37 + idx) + 0.5 * base);
          1: lvl = int'($urandom_range(0, 127)) - 64;
          2: lvl = base;
          default: lvl = (c + r > 4 + idx % 4) ? 60 : -60;
        endcase
        x[r*8+c] = lvl;
      end
    end
    add_block(x);
  endtask

  task automatic add_zero_block();
    int x [64];
    for (int i = 0; i < 64; i++) x[i] = 0;
    add_block(x);
  endtask

  // ---------------------------------------------------------------- monitor
  int   ecnt;            // enabled clocks since the last clear
  int   first_out;       // enabled clock of the first rdy
  bit   phase_b, stall_mode, mon_off;
  int   n_out, n_exact, n_stall, n_gap, n_tbank1, n_zbank1, n_clear;
  real  sq_err;
  bit   expect_next;

  always @(posedge clk) begin
    int   this_e;
    real  ev;
    bit   diff_ok;
    this_e = en ? ecnt + 1 : ecnt;
    if (clr || mon_off) begin
      ecnt <= 0;
      expect_next = 1'b0;
      first_out = 0;
    end else begin
      if (en) ecnt <= ecnt + 1;
      if (!en && stall_mode) n_stall++;
      if (dut.u_ctrl.we_t && dut.u_ctrl.addr_in_t[6]) n_tbank1++;
      if (dut.u_ctrl.re_z && dut.u_ctrl.z_addr[6])   n_zbank1++;
      // gap check: once output has started, every enabled clock yields rdy next
      if (expect_next) begin
        checks++;
        if (!rdy) begin
          failures++; n_gap++;
          $display("FAIL: missing output after an enabled clock (enabled clock %0d)", this_e);
        end
      end
      if (rdy) begin
        if (first_out == 0) begin
          first_out = this_e;
          checks++;
          if (!stall_mode && this_e != 124) begin
            failures++;
            $display("FAIL: first coefficient in enabled clock %0d, expected 124", this_e);
          end
        end
        // Outputs past the last expected one belong to the filler samples
        // that keep the pipeline moving until the last block is out.
        if (expq.size() != 0) begin
          ev = expq.pop_front();
          checks++;
          diff_ok = ($itor(data_out) - ev < 1.0) && (ev - $itor(data_out) < 1.0);
          if (!diff_ok) begin
            failures++;
            $display("FAIL: output %0d = %0d, expected %f", n_out, data_out, ev);
          end
          if (data_out == 9'(round_away(ev))) n_exact++;
          sq_err += ($itor(data_out) - ev) * ($itor(data_out) - ev);
          n_out++;
        end
      end
      expect_next = en && (first_out != 0 || rdy);
    end
  end

  // ---------------------------------------------------------------- driver
  task automatic stream(input int pen);   // pen = percent of clocks with en low
    while (blocks_q.size() > 0 || expq.size() > 0) begin
      @(posedge clk);
      if ($urandom_range(0, 99) < pen) begin
        en <= 1'b0;
        data_in <= 8'($urandom);
      end else begin
        en <= 1'b1;
        data_in <= (blocks_q.size() > 0) ? 8'(blocks_q.pop_front()) : 8'sd0;
      end
    end
    @(posedge clk);
    en <= 1'b0;
  endtask

  initial begin
    build_tables();
    clr = 1'b1; en = 1'b0; data_in = '0;
    ecnt = 0; first_out = 0; n_out = 0; n_exact = 0; sq_err = 0.0;
    n_stall = 0; n_gap = 0; n_tbank1 = 0; n_zbank1 = 0; n_clear = 0;
    phase_b = 0; stall_mode = 0; mon_off = 0; expect_next = 0;
    repeat (3) @(posedge clk);
    clr <= 1'b0;

    // Phase A: continuous stream, latency and throughput
    for (int b = 0; b < NA; b++) make_block(b % 4, b);
    for (int b = 0; b < FLUSH; b++) add_zero_block();
    // flush blocks are only needed to push data; their outputs are checked too
    stream(0);

    // Clear in the middle of a stream, then restart
    @(posedge clk);
    mon_off = 1;
    en <= 1'b1; data_in <= 8'sd77;
    repeat (40) @(posedge clk);
    clr <= 1'b1; en <= 1'b0;
    @(posedge clk);
    clr <= 1'b0;
    mon_off = 0;
    n_clear++;
    @(posedge clk);

    // Phase B: random stalls
    phase_b = 1; stall_mode = 1;
    for (int b = 0; b < NB; b++) make_block($urandom_range(0, 3), b + 7);
    for (int b = 0; b < FLUSH; b++) add_zero_block();
    stream(25);
    stall_mode = 0;
    repeat (5) @(posedge clk);

    checks++;
    if (n_stall == 0)  begin failures++; $display("FAIL: no stall happened"); end
    checks++;
    if (n_tbank1 == 0) begin failures++; $display("FAIL: second transpose half never used"); end
    checks++;
    if (n_zbank1 == 0) begin failures++; $display("FAIL: second zig-zag half never used"); end
    checks++;
    if (n_clear == 0)  begin failures++; $display("FAIL: no clear during operation"); end
    checks++;
    if (n_out != (NA + NB + 2 * FLUSH) * 64) begin
      failures++; $display("FAIL: %0d outputs, expected %0d", n_out, (NA + NB + 2 * FLUSH) * 64);
    end
    $display("outputs %0d, equal to rounded reference %0d, MSE vs unrounded %f",
             n_out, n_exact, sq_err / n_out);
    $display("stall clocks %0d, transpose upper-half writes %0d, zig-zag upper-half reads %0d, clears %0d",
             n_stall, n_tbank1, n_zbank1, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
