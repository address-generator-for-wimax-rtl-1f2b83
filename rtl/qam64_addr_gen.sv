// qam64_addr_gen: floor-free write-address generator of the 802.16e channel
// deinterleaver for 64-QAM blocks.
//
// For 64-QAM the columns form groups of three, and in row j the columns of
// every group are rotated by j mod 3:
//     kn = D*f + j,  f = 3*floor(i/3) + ((i mod 3) + (j mod 3)) mod 3
// (rows 0..3 of a 576-bit block begin 0,16,32,48,64 / 17,33,1,65,81 /
// 34,2,18,82,50 / 3,19,35,51,67). To stay free of floor and division, the
// generator keeps two small modulo-3 counters next to the row and column
// counters: p = i mod 3, stepped with the column counter and cleared when it
// wraps, and r = j mod 3, stepped with the row counter and cleared when it
// wraps. Then q = p + r, reduced by 3 when it reaches 3, and f = i - p + q.
// A multiplier with d on its second input forms D*f and an adder adds j.
// The mapping is the standard one; the counter-based structure and the
// block-size table (last column 8,17,26,35 for Ncbps = 144,288,432,576) are
// this design's own, built in the style of the QPSK and 16-QAM generators.
//
// Interface and timing are those of qpsk_addr_gen.
module qam64_addr_gen
  import wimax_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [1:0] crate,
  output addr_t      kn,
  output cnt_t       col,       // i
  output cnt_t       row,       // j
  output logic       col_wrap,
  output logic       last
);

  cnt_t last_col;
  logic row_at_limit;
  logic row_wrap;
  logic [1:0] p, r;             // i mod 3, j mod 3
  logic [2:0] q_sum;            // p + r, 0..4
  logic [1:0] q;                // (p + r) mod 3
  cnt_t f;                      // rotated column
  logic [ADDR_W-1:0] df;

  assign last_col = qam64_last_col(crate);

  bounded_counter #(.W(CNT_W)) u_clc (
    .clk, .rst_n, .en, .clr(1'b0),
    .limit(last_col), .count(col), .at_limit(), .wrap(col_wrap)
  );

  bounded_counter #(.W(CNT_W)) u_rwc (
    .clk, .rst_n, .en(col_wrap), .clr(1'b0),
    .limit(cnt_t'(D - 1)), .count(row), .at_limit(row_at_limit), .wrap(row_wrap)
  );

  // i mod 3: steps with the column counter, restarts with it.
  bounded_counter #(.W(2)) u_pmod3 (
    .clk, .rst_n, .en, .clr(col_wrap),
    .limit(2'd2), .count(p), .at_limit(), .wrap()
  );

  // j mod 3: steps with the row counter, restarts with it (D is not a
  // multiple of 3, so it must be cleared explicitly).
  bounded_counter #(.W(2)) u_rmod3 (
    .clk, .rst_n, .en(col_wrap), .clr(row_wrap),
    .limit(2'd2), .count(r), .at_limit(), .wrap()
  );

  assign q_sum = {1'b0, p} + {1'b0, r};
  assign q     = (q_sum >= 3'd3) ? 2'(q_sum - 3'd3) : q_sum[1:0];
  assign f     = col - cnt_t'(p) + cnt_t'(q);

  ml_mult #(.A_W(CNT_W), .B_W(CNT_W), .P_W(ADDR_W)) u_ml (
    .a(f), .b(cnt_t'(D)), .p(df)
  );

  assign kn   = df + addr_t'(row);
  assign last = (col >= last_col) && row_at_limit;

endmodule
