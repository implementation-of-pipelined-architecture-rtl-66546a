// tb_quant_rom -- checks all 64 words of the quantizer table.
//
// The expected word is computed here from its definition,
//   Q(u,v) = round( s_u s_v / (4 q(u,v)) * 4096 ),
// with s the 1-D DCT post-scale vector (s_0 = s_4 = cos(pi/4), s_1 =
// c7/c6, s_2 = c6/c4, s_3 = c5/c2, s_5 = c3/c2, s_6 = c2/c4, s_7 = c1/c6,
// cn = cos(n pi/16)) and q the standard JPEG luminance table; entry (6,5)
// is the one modified step and must read 19.
module tb_quant_rom;

  logic [5:0]  q_addr;
  logic [11:0] q_value;
  int checks = 0, failures = 0;

  quant_rom dut (.q_addr(q_addr), .q_value(q_value));

  localparam real PI = 3.14159265358979324;
  localparam int QSTD [64] = '{
    16, 11, 10, 16, 24, 40, 51, 61,   12, 12, 14, 19, 26, 58, 60, 55,
    14, 13, 16, 24, 40, 57, 69, 56,   14, 17, 22, 29, 51, 87, 80, 62,
    18, 22, 37, 56, 68,109,103, 77,   24, 35, 55, 64, 81,104,113, 92,
    49, 64, 78, 87,103,121,120,101,   72, 92, 95, 98,112,100,103, 99 };

  function automatic real cn(int n);
    return $cos(n * PI / 16.0);
  endfunction

  initial begin
    real s [8];
    int  e;
    s[0] = cn(4);         s[1] = cn(7) / cn(6); s[2] = cn(6) / cn(4); s[3] = cn(5) / cn(2);
    s[4] = cn(4);         s[5] = cn(3) / cn(2); s[6] = cn(2) / cn(4); s[7] = cn(1) / cn(6);
    for (int u = 0; u < 8; u++) begin
      for (int v = 0; v < 8; v++) begin
        e = $rtoi(s[u] * s[v] / (4.0 * QSTD[u*8+v]) * 4096.0 + 0.5);
        if (u == 6 && v == 5) e = 19;
        q_addr = 6'(u * 8 + v);
        #1;
        checks++;
        if (q_value != 12'(e)) begin
          failures++;
          $display("FAIL: Q(%0d,%0d) = %0d, expected %0d", u, v, q_value, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
