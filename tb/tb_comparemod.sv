// tb_comparemod: random responses with and without the enable; checks the
// combinational mismatch, the sticky error flag, the mismatch counter and
// clear.
module tb_comparemod;
  logic       clk = 1'b0, rst, clear, en;
  logic [1:0] tested_i, reference_i;
  logic       result, error_q;
  logic [7:0] mismatches;
  int checks = 0, failures = 0;
  int exp_cnt;
  bit exp_err, exp_res;

  comparemod #(.W(2), .CNT_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    rst = 1'b1; clear = 1'b0; en = 1'b0; tested_i = '0; reference_i = '0;
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    exp_cnt = 0; exp_err = 0;
    for (int k = 0; k < 400; k++) begin
      en          = 1'($urandom);
      tested_i    = 2'($urandom);
      reference_i = ($urandom_range(0, 1) == 0) ? tested_i : 2'($urandom);
      clear       = ($urandom_range(0, 40) == 0);
      #1;
      exp_res = en && (tested_i != reference_i);
      checks++;
      if (result !== exp_res) begin
        failures++;
        $display("FAIL result %b expected %b", result, exp_res);
      end
      @(posedge clk); #1;
      if (clear) begin
        exp_cnt = 0; exp_err = 0;
      end else if (exp_res) begin
        exp_err = 1;
        if (exp_cnt < 255) exp_cnt++;
      end
      checks++;
      if (error_q !== exp_err || int'(mismatches) != exp_cnt) begin
        failures++;
        $display("FAIL err=%b cnt=%0d expected %b %0d", error_q, mismatches, exp_err, exp_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
