// tb_transpose_buffer -- self-checking test of the two-port transpose RAM.
//
// Fills all 128 words with random data in a random address order while
// also presenting data with the write enable low (which must not be
// stored), then reads every word back through the asynchronous read port
// in transposed order and compares it with a copy kept here. It also
// checks that a word being overwritten still reads its old value in that
// clock, and that a write lands at the next clock edge.
module tb_transpose_buffer;

  logic clk = 1'b0;
  logic we;
  logic [6:0]  addr_in, addr_out;
  logic [10:0] data_in, data_out;
  logic [10:0] model [128];
  int checks = 0, failures = 0;

  transpose_buffer dut (.clk(clk), .we(we), .addr_in(addr_in), .data_in(data_in),
                        .addr_out(addr_out), .data_out(data_out));

  always #5 clk = ~clk;

  task automatic expect_word(input logic [6:0] a, input logic [10:0] v, input string what);
    addr_out = a;
    #1;
    checks++;
    if (data_out !== v) begin
      failures++;
      $display("FAIL: %s: word %0d reads %0d, expected %0d", what, a, data_out, v);
    end
  endtask

  initial begin
    int perm [128];
    int j, t;
    logic [10:0] v;
    we = 1'b0; addr_in = '0; data_in = '0; addr_out = '0;
    for (int i = 0; i < 128; i++) perm[i] = i;
    for (int i = 127; i > 0; i--) begin
      j = $urandom_range(0, i); t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    // fill, with disabled writes in between
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      we = 1'b1; addr_in = 7'(perm[i]); data_in = 11'($urandom);
      model[perm[i]] = data_in;
      @(negedge clk);
      we = 1'b0; addr_in = 7'(perm[(i + 1) % 128]); data_in = ~data_in;
    end
    @(negedge clk);
    // transposed read of both halves
    for (int k = 0; k < 128; k++)
      expect_word({k[6], k[2:0], k[5:3]}, model[{k[6], k[2:0], k[5:3]}], "transposed read");
    // same-clock overwrite: old value until the edge, new value after it
    @(negedge clk);
    we = 1'b1; addr_in = 7'd77; v = model[77]; data_in = ~v;
    expect_word(7'd77, v, "read during write");
    @(negedge clk);
    we = 1'b0;
    expect_word(7'd77, ~v, "read after write");
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
