// tb_wimax_deinterleaver: end-to-end test of the two-bank deinterleaver at
// its default size (576-bit banks, 1-bit words).
//
// The testbench draws random data blocks, interleaves each one with the
// standard's floor-based formulas (deint_ref_pkg::intl_pos), sends the
// interleaved bits with random gaps and checks that the deinterleaver
// returns every block in its original order, with out_last on the final bit
// of each block. Blocks use all three modulations and mixed sizes. It also
// checks the latency of a block that finds the output idle (first bit two
// clocks after the last input bit) and counts how often each mechanism
// happens: bank swaps in both directions, each modulation, a change of
// mode between blocks, input gaps, input stalls (in_ready low) and output
// that drains while no input arrives. A mechanism that never happens counts
// as a failure.
module tb_wimax_deinterleaver;
  import deint_ref_pkg::*;
  localparam int NBLK = 30;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready;
  logic [0:0] in_data = '0;
  logic [1:0] mod_sel = '0;
  logic [2:0] crate = '0;
  logic out_valid, out_last, sel;
  logic [0:0] out_data;

  wimax_deinterleaver dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  bit expected[$];           // original bits of all blocks, in order
  int exp_last[$];           // index in 'expected' of each block's last bit
  int out_n;
  int n_swap1, n_swap0, n_mod[3], n_cfg_change, n_gap, n_stall, n_drain;
  int last_in_cycle, cycle, lat_checked;
  logic out_busy_seen;

  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d bits out", out_n, expected.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_n >= expected.size()) begin
      failures++;
      $display("unexpected output bit %0d", out_n);
    end else if (out_data[0] != expected[out_n] ||
                 out_last != (exp_last.size() > 0 && exp_last[0] == out_n)) begin
      failures++;
      $display("output bit %0d: %0b exp %0b, last %0b", out_n, out_data, expected[out_n], out_last);
    end
    if (out_last && exp_last.size() > 0) void'(exp_last.pop_front());
    if (!in_valid) n_drain++;
    out_n++;
  end

  task automatic send_block(input int mod, input int cr, input int gap_pct);
    int ncbps, s;
    bit orig[], tx[];
    ncbps = ref_ncbps(mod, cr);
    s     = ref_s(mod);
    orig  = new[ncbps];
    tx    = new[ncbps];
    for (int k = 0; k < ncbps; k++) begin
      orig[k] = 1'($urandom);
      tx[intl_pos(k, ncbps, s)] = orig[k];
    end
    for (int k = 0; k < ncbps; k++) expected.push_back(orig[k]);
    exp_last.push_back(expected.size() - 1);
    n_mod[mod]++;
    mod_sel = 2'(mod);
    crate   = 3'(cr);
    for (int n = 0; n < ncbps; ) begin
      in_valid = ($urandom % 100) >= gap_pct;
      in_data  = tx[n];
      #1;
      if (!in_valid) n_gap++;
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        if (n == ncbps - 1) begin
          if (sel) n_swap1++; else n_swap0++;
          last_in_cycle = cycle;
        end
        n++;
      end
      @(posedge clk);
      #1;
    end
    in_valid = 0;
  endtask

  initial begin
    int prev_mod, prev_cr, mod, cr, t0;
    cycle = 0; out_n = 0; n_swap1 = 0; n_swap0 = 0; n_mod = '{0, 0, 0};
    n_cfg_change = 0; n_gap = 0; n_stall = 0; n_drain = 0; lat_checked = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    #1;

    // 1. the three sample blocks of the published address tables, then a
    //    pause long enough for the output to go idle, then a latency check
    send_block(0, 0, 0);     // QPSK, 96 bits
    send_block(1, 0, 0);     // 16-QAM, 192 bits
    send_block(2, 3, 0);     // 64-QAM, 576 bits
    repeat (600) @(posedge clk);
    #1;
    send_block(0, 2, 0);
    t0 = last_in_cycle;
    while (!out_valid) @(posedge clk);
    checks++;
    lat_checked++;
    if (cycle - t0 != 2) begin
      failures++;
      $display("latency %0d clocks, expected 2", cycle - t0);
    end
    #1;

    // 2. random blocks: a large block followed by a small one forces a stall
    prev_mod = 0; prev_cr = 2;
    for (int b = 0; b < NBLK; b++) begin
      mod = $urandom % 3;
      cr  = (b % 4 == 0) ? 7 : (b % 4 == 1) ? 0 : $urandom % 8;
      if (mod != prev_mod || cr != prev_cr) n_cfg_change++;
      send_block(mod, cr, (b % 2) ? 30 : 0);
      prev_mod = mod; prev_cr = cr;
    end
    repeat (700) @(posedge clk);

    checks++;
    if (out_n != expected.size()) begin
      failures++;
      $display("%0d of %0d bits came out", out_n, expected.size());
    end
    $display("mechanisms: swaps sel=1 %0d sel=0 %0d, QPSK %0d 16QAM %0d 64QAM %0d, mode changes %0d, gaps %0d, stalls %0d, drained bits %0d",
             n_swap1, n_swap0, n_mod[0], n_mod[1], n_mod[2], n_cfg_change, n_gap, n_stall, n_drain);
    if (n_swap1 == 0 || n_swap0 == 0 || n_mod[0] == 0 || n_mod[1] == 0 || n_mod[2] == 0 ||
        n_cfg_change == 0 || n_gap == 0 || n_stall == 0 || n_drain == 0 || lat_checked == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
