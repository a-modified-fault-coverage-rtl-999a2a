// tb_c17_faulty: for every one of the 22 single stuck-at faults and with no
// fault, applies all 32 input vectors and compares with the reference model.
// Also checks that C17 has no redundant fault: every fault changes the
// response for at least one input.
module tb_c17_faulty;
  import lp_pkg::*;
  import lp_tb_pkg::*;

  logic [4:0] x;
  fault_t     fault;
  logic [1:0] y;
  int checks = 0, failures = 0;
  int detected;

  c17_faulty dut (.x(x), .fault(fault), .y(y));

  initial begin
    detected = 0;
    for (int f = -1; f < 22; f++) begin
      automatic bit seen = 0;
      fault.en   = (f >= 0);
      fault.site = (f >= 0) ? 4'(f / 2) : 4'($urandom_range(0, 15));
      fault.sa   = (f >= 0) ? 1'(f % 2) : 1'($urandom);
      for (int i = 0; i < 32; i++) begin
        x = 5'(i);
        #1;
        checks++;
        if (y !== c17_model(x, fault.en, int'(fault.site), fault.sa)) begin
          failures++;
          $display("FAIL fault %0d x=%b y=%b", f, x, y);
        end
        if (y !== c17_model(x, 1'b0, 0, 1'b0)) seen = 1;
      end
      if (f >= 0 && seen) detected++;
    end
    checks++;
    if (detected != 22) begin
      failures++;
      $display("FAIL only %0d of 22 faults observable", detected);
    end
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
