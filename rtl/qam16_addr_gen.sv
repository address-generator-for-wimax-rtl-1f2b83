// qam16_addr_gen: floor-free write-address generator of the 802.16e channel
// deinterleaver for 16-QAM blocks.
//
// For 16-QAM the bits of every odd row are swapped in column pairs:
//     kn = D*i + j          if j is even
//     kn = D*(i+1) + j      if j is odd and i is even
//     kn = D*(i-1) + j      if j is odd and i is odd
// The hardware is the QPSK structure plus a column modifier:
//   - CLC1/C2 count i = 0 .. last, with last chosen by multiplexer M1 from a
//     2-bit selector (11,17,23,35 for Ncbps = 192,288,384,576);
//   - RWC1/C3 count j = 0 .. D-1, advancing on a column wrap;
//   - incrementer A1 (i+1) and decrementer A2 (i-1) feed multiplexer M2,
//     steered by MO0 = i mod 2; multiplexer M3, steered by MO1 = j mod 2,
//     picks i (even row) or M2's output (odd row);
//   - ML1 multiplies the chosen column by D and A3 adds j.
// The structure and constants follow the published 16-QAM schematic.
//
// Interface and timing are those of qpsk_addr_gen: `kn` is combinational
// from the counters, `en` steps, `last` flags the final bit, `crate` is held
// for a block, reset is synchronous and active low.
module qam16_addr_gen
  import wimax_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [1:0] crate,     // block-size selector of M1
  output addr_t      kn,
  output cnt_t       col,       // i
  output cnt_t       row,       // j
  output logic       col_wrap,  // CRST
  output logic       last
);

  cnt_t last_col;               // output of M1
  logic row_at_limit;
  cnt_t col_inc, col_dec;       // A1, A2
  cnt_t m2, m3;                 // multiplexer outputs
  logic mo0, mo1;               // modulo-2 blocks
  logic [ADDR_W-1:0] di;        // ML1 output

  assign last_col = qam16_last_col(crate);

  bounded_counter #(.W(CNT_W)) u_clc1 (
    .clk, .rst_n, .en, .clr(1'b0),
    .limit(last_col), .count(col), .at_limit(), .wrap(col_wrap)
  );

  bounded_counter #(.W(CNT_W)) u_rwc1 (
    .clk, .rst_n, .en(col_wrap), .clr(1'b0),
    .limit(cnt_t'(D - 1)), .count(row), .at_limit(row_at_limit), .wrap()
  );

  assign col_inc = col + cnt_t'(1);
  assign col_dec = col - cnt_t'(1);
  assign mo0     = col[0];
  assign mo1     = row[0];
  assign m2      = mo0 ? col_dec : col_inc;
  assign m3      = mo1 ? m2 : col;

  ml_mult #(.A_W(CNT_W), .B_W(CNT_W), .P_W(ADDR_W)) u_ml1 (
    .a(m3), .b(cnt_t'(D)), .p(di)
  );

  assign kn   = di + addr_t'(row);     // A3
  assign last = (col >= last_col) && row_at_limit;

endmodule
