// tb_lp_injector: exhaustive check of the injector over every present value,
// next value and random bit of a 4-bit half (512 cases).
module tb_lp_injector;
  import lp_tb_pkg::*;

  logic [3:0] cur, nxt, inj;
  logic       r;
  int checks = 0, failures = 0;

  lp_injector #(.W(4)) dut (.cur(cur), .nxt(nxt), .r(r), .inj(inj));

  initial begin
    for (int c = 0; c < 16; c++) begin
      for (int n = 0; n < 16; n++) begin
        for (int rr = 0; rr < 2; rr++) begin
          cur = 4'(c); nxt = 4'(n); r = 1'(rr);
          #1;
          checks++;
          if (inj !== injector(cur, nxt, r)) begin
            failures++;
            $display("FAIL cur=%b nxt=%b r=%b inj=%b", cur, nxt, r, inj);
          end
        end
      end
    end
    // The document's Ta example: present 1011, next 0101, R = 1 -> 1111.
    cur = 4'b1011; nxt = 4'b0101; r = 1'b1; #1;
    checks++;
    if (inj !== 4'b1111) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
