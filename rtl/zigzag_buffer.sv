// zigzag_buffer -- two-port RAM that reorders quantized coefficients.
//
// Quantized coefficients are written at their position in the 8x8 block
// (row*8 + column, plus the half bit) and read back in the order the
// zig-zag ROM gives, so the output leaves in JPEG zig-zag order. Like the
// transpose buffer it holds two 64-word halves that are used in turn.
//
// Interface and timing: write is synchronous (we, addr_in, data_in). The
// read port is registered: when re is high, the word at addr_out is loaded
// into data_out at the clock edge; otherwise data_out holds. This output
// register is the pipeline's output register. clr clears it. The 9-bit word
// and 7-bit addresses are the published widths; the registered read is this
// design's choice.
module zigzag_buffer #(
  parameter int unsigned DATA_W = 9,
  parameter int unsigned ADDR_W = 7
) (
  input  logic              clk,
  input  logic              clr,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr_in,
  input  logic [DATA_W-1:0] data_in,
  input  logic              re,
  input  logic [ADDR_W-1:0] addr_out,
  output logic [DATA_W-1:0] data_out
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr_in] <= data_in;
  end

  always_ff @(posedge clk) begin
    if (clr)     data_out <= '0;
    else if (re) data_out <= mem[addr_out];
  end

endmodule
