// tb_zigzag_rom -- checks the zig-zag read-address ROM for all 128 inputs.
//
// The expected scan is generated here by walking the 15 anti-diagonals of
// the 8x8 block, upwards-right on even diagonals and downwards-left on odd
// ones, starting at (0,0) then (0,1); the half bit must pass through.
module tb_zigzag_rom;

  logic [6:0] z_addr, addr_out;
  int checks = 0, failures = 0;

  zigzag_rom dut (.z_addr(z_addr), .addr_out(addr_out));

  initial begin
    int zz [64];
    int k, r, c;
    k = 0;
    for (int d = 0; d < 15; d++) begin
      for (int i = 0; i < 8; i++) begin
        r = (d % 2 == 0) ? d - i : i;
        c = d - r;
        if (r >= 0 && r < 8 && c >= 0 && c < 8) begin
          zz[k] = r * 8 + c;
          k++;
        end
      end
    end
    for (int a = 0; a < 128; a++) begin
      z_addr = 7'(a);
      #1;
      checks++;
      if (addr_out != 7'((a / 64) * 64 + zz[a % 64])) begin
        failures++;
        $display("FAIL: index %0d gives %0d, expected %0d", a, addr_out, (a / 64) * 64 + zz[a % 64]);
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
