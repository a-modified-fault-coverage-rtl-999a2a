// tb_bist_ctrl: walks the control unit through several sessions. Checks the
// one-cycle seed load, that exactly NUM_VECTORS cycles run with the pattern
// generator and analyzer enabled, done and the return to normal mode, and the
// interrupt: raised only by an error while vectors run, held until
// interrupt_clear_i, and kept when a new error meets the clear.
module tb_bist_ctrl;
  localparam int unsigned NV = 8;

  logic clk = 1'b0, rst, start_i, error_i, interrupt_clear_i;
  logic test_mode_o, seed_load_o, test_en_o, tra_en_o, tra_clear_o, done_o, irq_o;
  int checks = 0, failures = 0;

  bist_ctrl #(.NUM_VECTORS(NV)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int run_cycles;
  bit exp_irq;

  initial begin
    rst = 1'b1; start_i = 1'b0; error_i = 1'b0; interrupt_clear_i = 1'b0;
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    for (int s = 0; s < 4; s++) begin
      // normal mode
      #1;
      chk(!test_mode_o && !test_en_o && !tra_en_o && !done_o && !seed_load_o, "normal mode");
      // an error outside a session raises nothing
      error_i = 1'b1;
      @(posedge clk); #1;
      error_i = 1'b0;
      chk(irq_o == (s == 2), "no irq from error in normal mode");  // s==2 keeps the irq of session 1
      if (s == 2) begin
        interrupt_clear_i = 1'b1;
        @(posedge clk); #1;
        interrupt_clear_i = 1'b0;
        chk(!irq_o, "irq cleared");
      end
      start_i = 1'b1;
      @(posedge clk); #1;
      chk(test_mode_o && seed_load_o && tra_clear_o && !test_en_o, "seed load cycle");
      @(posedge clk); #1;
      run_cycles = 0;
      exp_irq = 0;
      while (test_en_o) begin
        chk(tra_en_o && test_mode_o && !seed_load_o, "run cycle");
        // session 1: error in cycle 3; session 2: error meets clear
        error_i = (s == 1 && run_cycles == 3) || (s == 2 && run_cycles >= 5);
        interrupt_clear_i = (s == 2 && run_cycles == 6);
        @(posedge clk); #1;
        if (error_i) exp_irq = 1;
        chk(irq_o == exp_irq, "irq during run");
        error_i = 1'b0; interrupt_clear_i = 1'b0;
        run_cycles++;
        if (run_cycles > 100) break;
      end
      chk(run_cycles == NV, $sformatf("run length %0d", run_cycles));
      chk(done_o && test_mode_o, "done");
      @(posedge clk); #1;
      chk(done_o, "done held while start_i high");
      if (s == 2) begin
        interrupt_clear_i = 1'b1;
        @(posedge clk); #1;
        interrupt_clear_i = 1'b0;
        chk(!irq_o, "irq cleared after session");
      end
      start_i = 1'b0;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
