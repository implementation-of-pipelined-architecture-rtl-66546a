// tb_quantizer -- self-checking test of the post-scaling quantizer.
//
// For every table position and many coefficients (random values over the
// whole 13-bit range, the range ends, and values that land exactly on a
// half unit) the output must equal round(coef * Q / 4096) with halves
// rounded away from zero. Q is computed here from its definition with the
// standard JPEG luminance table (entry (6,5) modified to 19), not read
// from the design's table.
module tb_quantizer;

  logic signed [12:0] coef;
  logic [5:0]         q_addr;
  logic signed [8:0]  q_out;
  int checks = 0, failures = 0;

  quantizer dut (.coef(coef), .q_addr(q_addr), .q_out(q_out));

  localparam real PI = 3.14159265358979324;
  localparam int QSTD [64] = '{
    16, 11, 10, 16, 24, 40, 51, 61,   12, 12, 14, 19, 26, 58, 60, 55,
    14, 13, 16, 24, 40, 57, 69, 56,   14, 17, 22, 29, 51, 87, 80, 62,
    18, 22, 37, 56, 68,109,103, 77,   24, 35, 55, 64, 81,104,113, 92,
    49, 64, 78, 87,103,121,120,101,   72, 92, 95, 98,112,100,103, 99 };

  function automatic real cn(int n);
    return $cos(n * PI / 16.0);
  endfunction

  int qv [64];
  int n_ties;

  task automatic try(input int c, input int p);
    real v;
    int  e;
    coef = 13'(c); q_addr = 6'(p);
    #1;
    v = $itor(c) * $itor(qv[p]) / 4096.0;
    e = (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
    if ((c * qv[p]) % 4096 == 2048 || (c * qv[p]) % 4096 == -2048) n_ties++;
    checks++;
    if (q_out != 9'(e)) begin
      failures++;
      $display("FAIL: coef %0d at %0d (Q=%0d) gives %0d, expected %0d", c, p, qv[p], q_out, e);
    end
  endtask

  initial begin
    real s [8];
    s[0] = cn(4);         s[1] = cn(7) / cn(6); s[2] = cn(6) / cn(4); s[3] = cn(5) / cn(2);
    s[4] = cn(4);         s[5] = cn(3) / cn(2); s[6] = cn(2) / cn(4); s[7] = cn(1) / cn(6);
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++)
        qv[u*8+v] = $rtoi(s[u] * s[v] / (4.0 * QSTD[u*8+v]) * 4096.0 + 0.5);
    qv[6*8+5] = 19;
    n_ties = 0;
    for (int p = 0; p < 64; p++) begin
      try(4095, p);
      try(-4096, p);
      try(0, p);
      for (int i = 0; i < 40; i++) try(int'($urandom_range(0, 8191)) - 4096, p);
    end
    // exact half units: Q(0,0) = 32, so 64 * 32 = 2048
    try(64, 0);  try(-64, 0);  try(192, 0);  try(-192, 0);
    checks++;
    if (n_ties < 4) begin failures++; $display("FAIL: only %0d ties tried", n_ties); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
