// addr_gen: address generator of the two-bank channel deinterleaver.
//
// It supplies the three signals the memory banks need: the write address
// (from the generator of the block's modulation), the read address and the
// bank selector `sel`. Received bits are written in arrival order at the
// floor-free deinterleaver addresses kn, so that reading a bank with a plain
// counter 0 .. Ncbps-1 returns the bits in their original order.
//
// Write side: `mod_sel` and `crate` are sampled with the first bit of a
// block and held until its last bit, so they may change freely between
// blocks. Only the generator of the held modulation is stepped; the others
// rest at row 0, column 0. Mode code 3 is treated as QPSK.
// Read side: when the last bit of a block is written, `sel` toggles, the
// just-filled bank becomes the read bank and the read counter runs from 0 to
// that block's Ncbps-1, one address per clock, whether or not new bits
// arrive. If the next block is shorter than the one being read, its last bit
// is held back (in_ready low) until the read finishes, so that no unread bit
// is overwritten.
// The bank swap on `sel` follows the published block diagram; the
// valid/ready handshake, the mode latching and the free-running read are
// this design's own choices.
//
// Timing: wr_addr, wr_en, rd_addr, rd_en, rd_last are combinational for the
// current cycle; the write happens on the next rising edge. After reset
// sel = 1 (bank M-1 is written first) and no read is pending.
module addr_gen
  import wimax_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,   // a received bit is offered
  output logic       in_ready,   // ... and is taken this cycle if both high
  input  logic [1:0] mod_sel,    // mod_t code, sampled at block start
  input  logic [2:0] crate,      // block-size selector, sampled at block start
  output addr_t      wr_addr,
  output logic       wr_en,      // write the offered bit at wr_addr
  output addr_t      rd_addr,
  output logic       rd_en,      // rd_addr holds a valid read this cycle
  output logic       rd_last,    // this read is the last of its block
  output logic       sel,        // 1: write M-1 / read M-2; 0: the reverse
  output logic       swap        // last bit of a block written this cycle
);

  logic       busy;              // a block is partly written
  mod_t       mod_q, mod_cur;
  logic [2:0] crate_q, crate_cur;
  mod_t       mod_in;

  addr_t kn_qpsk, kn_q16, kn_q64;
  logic  last_qpsk, last_q16, last_q64;
  logic  wr_last;
  cnt_t  last_col;
  addr_t wr_last_addr;           // Ncbps - 1 of the block being written
  addr_t rd_last_addr;           // Ncbps - 1 of the block being read
  logic  rd_active;

  always_comb begin
    case (mod_sel)
      2'd1:    mod_in = MOD_QAM16;
      2'd2:    mod_in = MOD_QAM64;
      default: mod_in = MOD_QPSK;
    endcase
  end

  assign mod_cur   = busy ? mod_q   : mod_in;
  assign crate_cur = busy ? crate_q : crate;

  qpsk_addr_gen u_qpsk (
    .clk, .rst_n, .en(wr_en && mod_cur == MOD_QPSK), .crate(crate_cur),
    .kn(kn_qpsk), .col(), .row(), .col_wrap(), .last(last_qpsk)
  );

  qam16_addr_gen u_qam16 (
    .clk, .rst_n, .en(wr_en && mod_cur == MOD_QAM16), .crate(crate_cur[1:0]),
    .kn(kn_q16), .col(), .row(), .col_wrap(), .last(last_q16)
  );

  qam64_addr_gen u_qam64 (
    .clk, .rst_n, .en(wr_en && mod_cur == MOD_QAM64), .crate(crate_cur[1:0]),
    .kn(kn_q64), .col(), .row(), .col_wrap(), .last(last_q64)
  );

  always_comb begin
    case (mod_cur)
      MOD_QAM16: begin
        wr_addr  = kn_q16;  wr_last = last_q16;
        last_col = qam16_last_col(crate_cur[1:0]);
      end
      MOD_QAM64: begin
        wr_addr  = kn_q64;  wr_last = last_q64;
        last_col = qam64_last_col(crate_cur[1:0]);
      end
      default: begin
        wr_addr  = kn_qpsk; wr_last = last_qpsk;
        last_col = qpsk_last_col(crate_cur);
      end
    endcase
  end

  // Ncbps - 1 = D * (last_col + 1) - 1
  assign wr_last_addr = addr_t'(D) * (addr_t'(last_col) + addr_t'(1)) - addr_t'(1);

  assign rd_en    = rd_active;
  assign rd_last  = rd_active && (rd_addr == rd_last_addr);
  assign in_ready = !(wr_last && rd_active && !rd_last);
  assign wr_en    = in_valid && in_ready;
  assign swap     = wr_en && wr_last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      mod_q        <= MOD_QPSK;
      crate_q      <= '0;
      sel          <= 1'b1;
      rd_active    <= 1'b0;
      rd_addr      <= '0;
      rd_last_addr <= '0;
    end else begin
      if (wr_en && !busy) begin
        mod_q   <= mod_in;
        crate_q <= crate;
      end
      if (swap)       busy <= 1'b0;
      else if (wr_en) busy <= 1'b1;

      if (swap) begin
        sel          <= !sel;
        rd_active    <= 1'b1;
        rd_addr      <= '0;
        rd_last_addr <= wr_last_addr;
      end else if (rd_active) begin
        if (rd_last) rd_active <= 1'b0;
        else         rd_addr   <= rd_addr + addr_t'(1);
      end
    end
  end

`ifndef SYNTHESIS
  // A block is never swapped into the read bank while the other is unread.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    swap |-> (!rd_active || rd_last));
  // Once a block is being read, it is read on every clock up to its end.
  a_read_burst: assert property (@(posedge clk) disable iff (!rst_n)
    (rd_en && !rd_last) |=> rd_en);
`endif

endmodule
