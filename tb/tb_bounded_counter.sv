// tb_bounded_counter: checks the comparator-reset counter against a
// behavioural model under random enable, clear and limit values, including
// a limit lowered below the current count (the counter must wrap at once).
module tb_bounded_counter;
  localparam int W = 4;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [W-1:0] limit = '0, count;
  logic at_limit, wrap;
  int checks = 0, failures = 0;
  int model;

  bounded_counter #(.W(W)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      en    = ($urandom % 4) != 0;
      clr   = ($urandom % 50) == 0;
      if (($urandom % 40) == 0) limit = W'($urandom);
      #1;
      checks++;
      if (count != W'(model) || at_limit != (model >= int'(limit)) ||
          wrap != (en && model >= int'(limit))) begin
        failures++;
        $display("cycle %0d: count %0d (exp %0d) at_limit %0b wrap %0b limit %0d",
                 c, count, model, at_limit, wrap, limit);
      end
      if (clr)                             model = 0;
      else if (en && model >= int'(limit)) model = 0;
      else if (en)                         model = (model + 1) % (1 << W);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
