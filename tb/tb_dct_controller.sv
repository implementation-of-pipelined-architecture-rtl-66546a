// tb_dct_controller -- self-checking test of the pipeline sequencer.
//
// The testbench plays the two 1-D DCTs: stat1 rises in the 15th enabled
// clock after the clear, stat2 in the 15th clock in which the controller
// enables the second DCT. With en dropped at random it then checks, clock
// by clock, against counters of its own:
//  * transpose writes start with stat1 at address 0 and count 0..127;
//  * the second DCT is enabled from the clock in which write address 65 is
//    presented, and transpose reads follow column order in each half
//    (0, 8, 16, ..., 56, 1, 9, ... 63, then 64, 72, ...);
//  * quantizer and zig-zag write addresses are the row-major position of a
//    coefficient emitted column by column (count k -> (k%8)*8 + k/8);
//  * zig-zag reads start with the 30th write (index 29) and count up;
//  * rdy is re_z delayed one clock; nothing moves with en low.
module tb_dct_controller;

  logic clk = 1'b0;
  logic clr, en, stat1, stat2;
  logic en1, en2, we_t, we_z, re_z, rdy;
  logic [6:0] addr_in_t, addr_out_t, addr_in_z, z_addr;
  logic [5:0] q_addr;
  int checks = 0, failures = 0;

  dct_controller dut (
    .clk(clk), .clr(clr), .en(en), .stat1(stat1), .stat2(stat2),
    .en1(en1), .en2(en2), .we_t(we_t), .addr_in_t(addr_in_t), .addr_out_t(addr_out_t),
    .q_addr(q_addr), .we_z(we_z), .addr_in_z(addr_in_z), .re_z(re_z), .z_addr(z_addr),
    .rdy(rdy));

  always #5 clk = ~clk;

  int ecnt, e2cnt, nw_t, nr_t, nw_z, nr_z, n_stall;
  bit prev_re;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (enabled clock %0d)", what, ecnt);
    end
  endtask

  // DCT models: stat after 14 enabled clocks of each unit
  assign stat1 = (ecnt >= 14);
  assign stat2 = (e2cnt >= 14);

  always @(posedge clk) begin
    if (clr) begin
      ecnt <= 0; e2cnt <= 0; nw_t <= 0; nr_t <= 0; nw_z <= 0; nr_z <= 0; prev_re <= 0;
    end else begin
      chk(rdy == prev_re, "rdy is re_z one clock later");
      prev_re <= re_z;
      chk(en1 == en, "en1 follows en");
      if (!en) begin
        n_stall++;
        chk(!en2 && !we_t && !we_z && !re_z, "nothing moves with en low");
      end else begin
        ecnt <= ecnt + 1;
        chk(we_t == stat1, "transpose write with the first row coefficient");
        if (we_t) begin
          chk(addr_in_t == 7'(nw_t), "transpose write address counts up");
          nw_t <= nw_t + 1;
        end
        chk(en2 == (nw_t >= 65), "second DCT enabled from write address 65");
        if (en2) begin
          e2cnt <= e2cnt + 1;
          chk(addr_out_t == 7'((nr_t / 64) * 64 + (nr_t % 8) * 8 + (nr_t % 64) / 8),
              "transposed read address");
          nr_t <= nr_t + 1;
        end
        chk(we_z == stat2, "zig-zag write with the first column coefficient");
        if (we_z) begin
          chk(q_addr == 6'((nw_z % 8) * 8 + (nw_z % 64) / 8), "quantizer position");
          chk(addr_in_z == 7'(((nw_z / 64) % 2) * 64 + (nw_z % 8) * 8 + (nw_z % 64) / 8),
              "zig-zag write address");
          nw_z <= nw_z + 1;
        end
        chk(re_z == (nw_z >= 29), "zig-zag read from the 30th write");
        if (re_z) begin
          chk(z_addr == 7'(nr_z), "zig-zag ROM count");
          nr_z <= nr_z + 1;
        end
      end
    end
  end

  initial begin
    clr = 1'b1; en = 1'b0; n_stall = 0;
    repeat (2) @(posedge clk);
    clr <= 1'b0;
    for (int c = 0; c < 1500; c++) begin
      @(posedge clk);
      en <= ($urandom_range(0, 99) >= 20);
    end
    @(posedge clk);
    chk(nr_z > 200 && nw_t > 300 && n_stall > 100, "run reached both halves of every buffer");
    $display("transpose writes %0d reads %0d, zig-zag writes %0d reads %0d, stalls %0d",
             nw_t, nr_t, nw_z, nr_z, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
