// tb_ml_mult: exhaustive check of the 8 x 8 shift-and-add multiplier with a
// full 16-bit product, and of a 10-bit truncated instance as the address
// generators use it (column number times d = 16).
module tb_ml_mult;
  logic [7:0]  a, b;
  logic [15:0] p;
  logic [9:0]  p_gen;
  int checks = 0, failures = 0;

  ml_mult dut (.a, .b, .p);
  ml_mult #(.A_W(8), .B_W(8), .P_W(10)) dut_gen (.a, .b(8'd16), .p(p_gen));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a = 8'(x);
        b = 8'(y);
        #1;
        checks++;
        if (p != 16'(x * y)) begin
          failures++;
          if (failures < 20) $display("%0d * %0d = %0d", x, y, p);
        end
      end
      checks++;
      if (p_gen != 10'(x * 16)) begin
        failures++;
        $display("%0d * 16 = %0d (10-bit)", x, p_gen);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
