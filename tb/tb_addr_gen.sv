// tb_addr_gen: drives the address generator with a stream of blocks of
// random modulation and size, with random gaps in the input, and checks
//   - every write address against the standard's floor-based formula,
//   - that sel toggles exactly when a block's last bit is written,
//   - that each filled block is then read at addresses 0 .. Ncbps-1 in
//     order, one per clock, with rd_last on the final one,
//   - that in_ready only falls on the last bit of a block that is shorter
//     than the block still being read, and that this stall happens.
module tb_addr_gen;
  import deint_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready;
  logic [1:0] mod_sel = '0;
  logic [2:0] crate = '0;
  logic [9:0] wr_addr, rd_addr;
  logic wr_en, rd_en, rd_last, sel, swap;
  int checks = 0, failures = 0;

  addr_gen dut (.*);

  always #5 clk = !clk;

  // block sizes of the blocks written, in order, for the read checker
  int wr_sizes[$];
  int wr_n, wr_ncbps, wr_s, wr_mod, blocks_done;
  int rd_n, rd_ncbps;
  logic rd_busy, exp_sel;
  int n_stall, n_swap1, n_swap0, n_mod[3];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // read-side checker: runs on every clock edge
  always @(posedge clk) if (rst_n) begin
    if (rd_en) begin
      if (!rd_busy) begin
        failures++;
        $display("read without a filled block");
      end else begin
        checks++;
        if (int'(rd_addr) != rd_n || rd_last != (rd_n == rd_ncbps - 1)) begin
          failures++;
          $display("read %0d of %0d: rd_addr %0d rd_last %0b", rd_n, rd_ncbps, rd_addr, rd_last);
        end
        rd_n++;
        if (rd_n == rd_ncbps) rd_busy = 1'b0;
      end
    end
    if (swap) begin
      checks++;
      if (rd_busy) begin
        failures++;
        $display("swap while %0d bits still unread", rd_ncbps - rd_n);
      end
      rd_busy  = 1'b1;
      rd_n     = 0;
      rd_ncbps = wr_sizes.pop_front();
    end
  end

  initial begin
    rd_busy = 1'b0; rd_n = 0; rd_ncbps = 0;
    n_stall = 0; n_swap1 = 0; n_swap0 = 0; n_mod = '{0, 0, 0};
    exp_sel = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < 24; b++) begin
      // large and small blocks alternate often enough to force stalls
      wr_mod   = $urandom % 3;
      mod_sel  = 2'(wr_mod);
      crate    = (b % 3 == 2) ? 3'd0 : 3'($urandom);
      if (b % 3 == 1) crate = 3'd7;
      wr_ncbps = ref_ncbps(wr_mod, int'(crate));
      wr_s     = ref_s(wr_mod);
      wr_n     = 0;
      n_mod[wr_mod]++;
      while (wr_n < wr_ncbps) begin
        in_valid = ($urandom % 4) != 0;
        #1;
        checks++;
        if (sel != exp_sel) begin
          failures++;
          $display("block %0d: sel %0b exp %0b", b, sel, exp_sel);
        end
        if (in_valid && !in_ready) begin
          n_stall++;
          checks++;
          if (wr_n != wr_ncbps - 1 || !rd_busy) begin
            failures++;
            $display("block %0d: in_ready low at bit %0d", b, wr_n);
          end
        end
        if (wr_en) begin
          checks++;
          if (int'(wr_addr) != deint_addr(wr_n, wr_ncbps, wr_s) ||
              swap != (wr_n == wr_ncbps - 1)) begin
            failures++;
            $display("block %0d bit %0d: wr_addr %0d exp %0d swap %0b", b, wr_n,
                     wr_addr, deint_addr(wr_n, wr_ncbps, wr_s), swap);
          end
          if (wr_n == wr_ncbps - 1) begin
            wr_sizes.push_back(wr_ncbps);
            if (sel) n_swap1++; else n_swap0++;
            exp_sel = !exp_sel;
          end
          wr_n++;
        end
        @(posedge clk);
        #1;
        // the mode may change freely in mid-block: it must be ignored
        if (wr_n > 0 && wr_n < wr_ncbps) begin
          mod_sel = 2'($urandom);
          crate   = 3'($urandom);
        end
      end
    end
    in_valid = 0;
    repeat (700) @(posedge clk);
    #1;
    checks++;
    if (rd_busy || rd_en) begin
      failures++;
      $display("last block not fully read");
    end
    $display("mechanisms: stalls %0d, swaps from sel=1 %0d, from sel=0 %0d, blocks QPSK %0d 16QAM %0d 64QAM %0d",
             n_stall, n_swap1, n_swap0, n_mod[0], n_mod[1], n_mod[2]);
    if (n_stall == 0 || n_swap1 == 0 || n_swap0 == 0 || n_mod[0] == 0 || n_mod[1] == 0 || n_mod[2] == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
