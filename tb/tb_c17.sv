// tb_c17: exhaustive check of the fault-free C17 against its sum-of-products
// form: y0 = x0 x1 + x2 (x1 x3)',  y1 = (x1 x3)' (x2 + x4).
module tb_c17;
  logic [4:0] x;
  logic [1:0] y;
  logic [1:0] e;
  int checks = 0, failures = 0;

  c17 dut (.x(x), .y(y));

  initial begin
    for (int i = 0; i < 32; i++) begin
      x = 5'(i);
      #1;
      e[0] = (x[0] & x[1]) | (x[2] & ~(x[1] & x[3]));
      e[1] = ~(x[1] & x[3]) & (x[2] | x[4]);
      checks++;
      if (y !== e) begin
        failures++;
        $display("FAIL x=%b y=%b expected %b", x, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
