// tb_qam16_addr_gen: runs the qam16_addr_gen generator through one whole block for every
// block-size selector and compares each address with the standard's
// floor-based deinterleaver formula (deint_ref_pkg). The enable is dropped
// at random, so the generator must hold its place; it must raise 'last' on
// exactly the Ncbps-th enabled cycle (one address per clock) and be back at
// address 0 afterwards.
module tb_qam16_addr_gen;
  import deint_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic [2-1:0] crate = '0;
  logic [9:0] kn;
  logic [7:0] col, row;
  logic col_wrap, last;
  int checks = 0, failures = 0;
  int n, ncbps, s, exp_k, steps;

  qam16_addr_gen dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = ref_s(1);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 4; c++) begin
      crate = 2'(c);
      ncbps = ref_ncbps(1, c);
      n     = 0;
      steps = 0;
      while (n < ncbps) begin
        en = ($urandom % 5) != 0;
        #1;
        if (en) begin
          exp_k = deint_addr(n, ncbps, s);
          checks++;
          if (int'(kn) != exp_k || col != 8'(n % (ncbps / 16)) || row != 8'(n / (ncbps / 16))) begin
            failures++;
            $display("crate %0d n %0d: kn %0d exp %0d (i %0d j %0d)", c, n, kn, exp_k, col, row);
          end
          checks++;
          if (last != (n == ncbps - 1)) begin
            failures++;
            $display("crate %0d n %0d: last=%0b", c, n, last);
          end
          checks++;
          if (col_wrap != ((n % (ncbps / 16)) == ncbps / 16 - 1)) begin
            failures++;
            $display("crate %0d n %0d: col_wrap=%0b", c, n, col_wrap);
          end
          n++;
          steps++;
        end
        @(posedge clk);
        #1;
      end
      en = 0;
      #1;
      checks++;
      if (kn != 0 || col != 0 || row != 0 || steps != ncbps) begin
        failures++;
        $display("crate %0d: not back at start after %0d steps (kn %0d)", c, steps, kn);
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
