// deint_mem: one bank of the ping-pong deinterleaver memory (M-1 or M-2).
//
// A single-port memory with one address A shared by writing and reading,
// as drawn for the two banks of the block (de)interleaver: when WE is high
// the word on DIN is written at A on the rising clock edge; DOUT always
// shows the word stored at A (asynchronous read, as an FPGA distributed RAM
// provides). DEPTH defaults to the largest block, 576 bits, and DW to one
// bit per location because the deinterleaver permutes a bit stream; both
// are this design's choices of size. The array is not reset: every location
// that is read has been written first.
module deint_mem #(
  parameter int unsigned DEPTH = 576,
  parameter int unsigned DW    = 1,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
  end

  assign dout = mem[addr];

endmodule
