// qpsk_addr_gen: floor-free write-address generator of the 802.16e channel
// deinterleaver for QPSK blocks.
//
// The received block is treated as D rows by Ncbps/D columns and walked row
// by row. For QPSK the address of the bit in row j, column i is
//     kn = D*i + j
// which needs only two counters, a multiplier and an adder:
//   - column counter CLC0 counts i = 0 .. last; comparator C0 compares it
//     with the constant chosen by multiplexer M0 from the 3-bit code-rate
//     selector (last = 5,8,11,17,23,26,29,35 for Ncbps = 96 .. 576);
//   - row counter RWC0 counts j = 0 .. D-1, advancing when the column
//     counter wraps; comparator C1 resets it after D-1;
//   - multiplier ML0, with d tied to its second input, forms D*i and A0
//     adds j.
// This structure and the multiplexer constants follow the published QPSK
// schematic. Advancing the row counter only on a column wrap (the schematic
// draws the clock only) follows the published simulation trace.
//
// Interface: `en` steps to the next bit; `kn` is combinational from the
// counters and is the address of the current bit, so it is used in the same
// cycle as the data bit it belongs to. `last` flags the final bit of the
// block. `crate` must be held for a whole block. Reset: synchronous, active
// low, to i = j = 0.
module qpsk_addr_gen
  import wimax_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [2:0] crate,     // block-size / code-rate selector of M0
  output addr_t      kn,        // write address of the current bit
  output cnt_t       col,       // i
  output cnt_t       row,       // j
  output logic       col_wrap,  // CRST: column counter returns to 0
  output logic       last       // current bit is the last of the block
);

  cnt_t last_col;               // output of multiplexer M0
  logic row_at_limit;
  logic [ADDR_W-1:0] di;        // ML0 output: D*i

  assign last_col = qpsk_last_col(crate);

  bounded_counter #(.W(CNT_W)) u_clc0 (
    .clk, .rst_n, .en, .clr(1'b0),
    .limit(last_col), .count(col), .at_limit(), .wrap(col_wrap)
  );

  bounded_counter #(.W(CNT_W)) u_rwc0 (
    .clk, .rst_n, .en(col_wrap), .clr(1'b0),
    .limit(cnt_t'(D - 1)), .count(row), .at_limit(row_at_limit), .wrap()
  );

  ml_mult #(.A_W(CNT_W), .B_W(CNT_W), .P_W(ADDR_W)) u_ml0 (
    .a(col), .b(cnt_t'(D)), .p(di)
  );

  assign kn   = di + addr_t'(row);     // A0
  assign last = (col >= last_col) && row_at_limit;

endmodule
