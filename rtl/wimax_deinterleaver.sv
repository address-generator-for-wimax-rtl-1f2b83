// wimax_deinterleaver: IEEE 802.16e two-dimensional channel deinterleaver
// for QPSK, 16-QAM and 64-QAM blocks of up to 576 coded bits.
//
// Two memory banks, M-1 and M-2, work as a ping-pong buffer. While one bank
// is written with the received bits of a block, each at the address kn that
// addr_gen computes without any floor function, the other bank is read in
// address order 0 .. Ncbps-1, which yields the previous block deinterleaved.
// The bank selector sel steers everything: sel = 1 enables WE of M-1, gives
// M-1 the write address and M-2 the read address, and routes M-2 to the
// output; sel = 0 does the reverse (WE of M-2 is the inverse of sel). This
// wiring follows the published block diagram; gating WE with the input
// handshake and registering the output are this design's choices.
//
// Interface: a bit on in_data is taken when in_valid and in_ready are both
// high; mod_sel (0 QPSK, 1 16-QAM, 2 64-QAM) and crate (block-size selector,
// see wimax_pkg) are sampled with the first bit of each block. Deinterleaved
// bits come out on out_data with out_valid, with out_last on the final bit
// of a block; the output has no backpressure.
// Timing: a block's first output bit appears two clocks after its last
// input bit was taken (one clock to write it, one for the output register),
// then one bit per clock. in_ready falls only when a block shorter than the
// one being read is about to complete.
module wimax_deinterleaver
  import wimax_pkg::*;
#(
  parameter int unsigned DATA_W = 1      // bits per memory word
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  input  logic [1:0]        mod_sel,
  input  logic [2:0]        crate,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data,
  output logic              out_last,
  output logic              sel
);

  addr_t wr_addr, rd_addr;
  logic  wr_en, rd_en, rd_last;
  addr_t a1, a2;
  logic  we1, we2;
  logic [DATA_W-1:0] dout1, dout2;

  addr_gen u_addr_gen (
    .clk, .rst_n, .in_valid, .in_ready, .mod_sel, .crate,
    .wr_addr, .wr_en, .rd_addr, .rd_en, .rd_last, .sel, .swap()
  );

  // Address multiplexers and write enables of the two banks.
  assign a1  = sel ? wr_addr : rd_addr;
  assign a2  = sel ? rd_addr : wr_addr;
  assign we1 = wr_en &&  sel;
  assign we2 = wr_en && !sel;

  deint_mem #(.DEPTH(NCBPS_MAX), .DW(DATA_W), .AW(ADDR_W)) u_m1 (
    .clk, .we(we1), .addr(a1), .din(in_data), .dout(dout1)
  );

  deint_mem #(.DEPTH(NCBPS_MAX), .DW(DATA_W), .AW(ADDR_W)) u_m2 (
    .clk, .we(we2), .addr(a2), .din(in_data), .dout(dout2)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= rd_en;
      out_last  <= rd_last;
      out_data  <= sel ? dout2 : dout1;   // output multiplexer
    end
  end

endmodule
