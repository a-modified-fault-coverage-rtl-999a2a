// tb_lp_phase_ctrl: checks the four-step sequence Tc -> T -> Ta -> Tb -> Tc,
// the clock enables and injector selects of each step, holding while test_en
// is low, and restart.
module tb_lp_phase_ctrl;
  import lp_pkg::*;

  logic clk = 1'b0, rst, restart, test_en;
  lp_phase_e phase;
  logic en_first, en_second, inj_first, inj_second;
  int checks = 0, failures = 0;
  int exp_ph;

  lp_phase_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check_outputs(input int ph, input logic ten);
    checks++;
    if (int'(phase) != ph
        || en_first   !== (ten && ph == 3)
        || en_second  !== (ten && ph == 1)
        || inj_first  !== (ph == 3)
        || inj_second !== (ph == 1)) begin
      failures++;
      $display("FAIL ph=%0d got phase=%0d ef=%b es=%b if=%b is=%b", ph, phase,
               en_first, en_second, inj_first, inj_second);
    end
  endtask

  initial begin
    rst = 1'b1; restart = 1'b0; test_en = 1'b0;
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    exp_ph = 3;
    for (int k = 0; k < 200; k++) begin
      test_en = 1'($urandom_range(0, 3) != 0);
      #1;
      check_outputs(exp_ph, test_en);
      @(posedge clk); #1;
      if (test_en) exp_ph = (exp_ph + 1) % 4;
    end
    // restart from any phase goes back to Tc and blocks the enables
    test_en = 1'b1; restart = 1'b1; #1;
    checks++;
    if (en_first || en_second) failures++;
    @(posedge clk); #1;
    restart = 1'b0; #1;
    check_outputs(3, 1'b1);
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
