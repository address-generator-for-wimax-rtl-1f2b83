// tb_deint_mem: writes random bits to random addresses of a 576 x 1 bank
// and checks every asynchronous read against a model array, including a
// read of the address being written in the same cycle (old value until the
// clock edge, new value after it).
module tb_deint_mem;
  localparam int DEPTH = 576;
  logic clk = 0, we = 0;
  logic [9:0] addr = '0;
  logic [0:0] din = '0, dout;
  logic model [DEPTH];
  logic written [DEPTH];
  int checks = 0, failures = 0;

  deint_mem dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) written[a] = 1'b0;
    @(posedge clk);
    #1;
    // fill every location once
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; addr = 10'(a); din = 1'($urandom);
      @(posedge clk);
      model[a] = din[0]; written[a] = 1'b1;
      #1;
    end
    for (int c = 0; c < 6000; c++) begin
      we   = ($urandom % 3) == 0;
      addr = 10'($urandom % DEPTH);
      din  = 1'($urandom);
      #1;
      checks++;
      if (dout[0] != model[addr]) begin
        failures++;
        $display("cycle %0d addr %0d: read %0b exp %0b", c, addr, dout, model[addr]);
      end
      @(posedge clk);
      if (we) model[addr] = din[0];
      #1;
      checks++;
      if (dout[0] != model[addr]) begin
        failures++;
        $display("cycle %0d addr %0d after edge: read %0b exp %0b", c, addr, dout, model[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
