// transpose_buffer -- two-port RAM between the two 1-D DCTs.
//
// The first 1-D DCT writes its row coefficients here one per clock at the
// address the controller counts up (row*8 + column); the controller reads
// them back at the transposed address (column*8 + row), so the second 1-D
// DCT receives the columns. The buffer holds 2**ADDR_W words: with the
// default 7-bit addresses that is two 64-word halves, one being filled while
// the other is read, so blocks stream without a gap.
//
// Interface and timing: write is synchronous (data_in is stored at addr_in at
// the clock edge when we is high); read is asynchronous, data_out follows
// addr_out in the same clock, as in the published waveforms. A read of the
// word being written in the same clock returns the old contents; the
// controller never does that. Widths follow the published symbol (11-bit
// data, 7-bit addresses). The memory has no reset; the controller reads
// only words written before.
module transpose_buffer #(
  parameter int unsigned DATA_W = 11,
  parameter int unsigned ADDR_W = 7
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr_in,
  input  logic [DATA_W-1:0] data_in,
  input  logic [ADDR_W-1:0] addr_out,
  output logic [DATA_W-1:0] data_out
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr_in] <= data_in;
  end

  assign data_out = mem[addr_out];

endmodule
