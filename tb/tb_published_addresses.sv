// tb_published_addresses: checks the three address generators against the
// published sample addresses, independently of any formula:
//   - the first four rows and five columns of the address matrix for a
//     96-bit QPSK block, a 192-bit 16-QAM block and a 576-bit 64-QAM block;
//   - the address sequences of the QPSK (96-bit) and 16-QAM (192-bit)
//     simulation traces, from the second address onwards.
// Each generator is stepped one address per clock from reset.
module tb_published_addresses;
  logic clk = 0, rst_n = 0, en = 0;
  logic [9:0] kn_qpsk, kn_q16, kn_q64;
  logic last_qpsk, last_q16, last_q64;
  int checks = 0, failures = 0;

  // first 4 rows x 5 columns, row-major
  int tab_qpsk[20] = '{ 0, 16, 32, 48, 64,   1, 17, 33, 49, 65,
                        2, 18, 34, 50, 66,   3, 19, 35, 51, 67};
  int tab_q16[20]  = '{ 0, 16, 32, 48, 64,  17,  1, 49, 33, 81,
                        2, 18, 34, 50, 66,  19,  3, 51, 35, 83};
  int tab_q64[20]  = '{ 0, 16, 32, 48, 64,  17, 33,  1, 65, 81,
                       34,  2, 18, 82, 50,   3, 19, 35, 51, 67};
  // trace sequences starting at the second address of the block
  int trace_qpsk[16] = '{16, 32, 48, 64, 80, 1, 17, 33, 49, 65, 81, 2, 18, 34, 50, 66};
  int trace_q16[30]  = '{16, 32, 48, 64, 80, 96, 112, 128, 144, 160, 176,
                         17, 1, 49, 33, 81, 65, 113, 97, 145, 129, 177, 161,
                         2, 18, 34, 50, 66, 82, 98};

  int seq_qpsk[576], seq_q16[576], seq_q64[576];

  qpsk_addr_gen  u_qpsk (.clk, .rst_n, .en, .crate(3'd0), .kn(kn_qpsk),
                         .col(), .row(), .col_wrap(), .last(last_qpsk));
  qam16_addr_gen u_q16  (.clk, .rst_n, .en, .crate(2'd0), .kn(kn_q16),
                         .col(), .row(), .col_wrap(), .last(last_q16));
  qam64_addr_gen u_q64  (.clk, .rst_n, .en, .crate(2'd3), .kn(kn_q64),
                         .col(), .row(), .col_wrap(), .last(last_q64));

  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    en = 1;
    for (int n = 0; n < 576; n++) begin
      #1;
      seq_qpsk[n] = int'(kn_qpsk);
      seq_q16[n]  = int'(kn_q16);
      seq_q64[n]  = int'(kn_q64);
      if (n == 95)  expect_eq("QPSK last flag",   int'(last_qpsk), 1);
      if (n == 191) expect_eq("16-QAM last flag", int'(last_q16),  1);
      if (n == 575) expect_eq("64-QAM last flag", int'(last_q64),  1);
      @(posedge clk);
    end
    en = 0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 5; c++) begin
        expect_eq($sformatf("QPSK 96 row %0d col %0d", r, c),    seq_qpsk[r * 6 + c],  tab_qpsk[r * 5 + c]);
        expect_eq($sformatf("16-QAM 192 row %0d col %0d", r, c), seq_q16[r * 12 + c],  tab_q16[r * 5 + c]);
        expect_eq($sformatf("64-QAM 576 row %0d col %0d", r, c), seq_q64[r * 36 + c],  tab_q64[r * 5 + c]);
      end
    for (int n = 0; n < 16; n++) expect_eq($sformatf("QPSK trace %0d", n + 1),   seq_qpsk[n + 1], trace_qpsk[n]);
    for (int n = 0; n < 30; n++) expect_eq($sformatf("16-QAM trace %0d", n + 1), seq_q16[n + 1],  trace_q16[n]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
