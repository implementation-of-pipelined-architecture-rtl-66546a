// tb_zigzag_buffer -- self-checking test of the zig-zag reorder RAM.
//
// Writes random quantized coefficients to all 128 words (with disabled
// writes in between that must not land), then reads them back in a random
// order through the registered read port: data_out must change only at the
// clock edge after re is high, hold while re is low, and clear with clr.
module tb_zigzag_buffer;

  logic clk = 1'b0;
  logic clr, we, re;
  logic [6:0] addr_in, addr_out;
  logic [8:0] data_in, data_out;
  logic [8:0] model [128];
  int checks = 0, failures = 0;

  zigzag_buffer dut (.clk(clk), .clr(clr), .we(we), .addr_in(addr_in), .data_in(data_in),
                     .re(re), .addr_out(addr_out), .data_out(data_out));

  always #5 clk = ~clk;

  task automatic check(input logic [8:0] v, input string what);
    checks++;
    if (data_out !== v) begin
      failures++;
      $display("FAIL: %s: data_out %0d, expected %0d", what, data_out, v);
    end
  endtask

  initial begin
    logic [8:0] last;
    logic [6:0] a;
    clr = 1'b1; we = 1'b0; re = 1'b0; addr_in = '0; addr_out = '0; data_in = '0;
    @(negedge clk);
    check(9'd0, "after clear");
    clr = 1'b0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      we = 1'b1; addr_in = 7'(i); data_in = 9'($urandom);
      model[i] = data_in;
      @(negedge clk);
      we = 1'b0; data_in = ~data_in;
    end
    last = 9'd0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      a = 7'($urandom);
      addr_out = a; re = $urandom_range(0, 3) != 0;
      #1;
      check(last, "before the edge");          // registered: no change yet
      @(posedge clk);
      #1;
      if (re) last = model[a];
      check(last, re ? "registered read" : "hold with re low");
    end
    @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    check(9'd0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
