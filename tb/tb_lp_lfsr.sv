// tb_lp_lfsr: checks the low-power LFSR against the document's worked example
// (seed 0100_1011 gives T1 = 1010_1011, Ta = 1010_1111, Tb = 1010_0101,
// Tc = 1111_0101, T2 = 0101_0101), then against a model built on a plain LFSR
// for 1000 steps with random pauses of test_en, a reload of a random seed,
// and the low-power properties: each step changes only one half of the output,
// and the transitions over the four steps from one T vector to the next equal
// the Hamming distance between those two T vectors.
module tb_lp_lfsr;
  import lp_pkg::*;
  import lp_tb_pkg::*;

  localparam logic [7:0] TAPS = 8'b1000_0001;
  localparam logic [7:0] SEED = 8'b0100_1011;

  logic       clk = 1'b0, rst, test_en, seed_load;
  logic [7:0] seed_in, lp_out;
  logic       hold_q;
  lp_phase_e  phase;
  int checks = 0, failures = 0;

  lp_lfsr dut (.*);

  always #5 clk = ~clk;

  task automatic expect_vec(input logic [7:0] v, input string what);
    checks++;
    if (lp_out !== v) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, lp_out, v);
    end
  endtask

  logic [7:0] p0, prev, t_prev;
  int idx, trans;

  initial begin
    rst = 1'b1; test_en = 1'b0; seed_load = 1'b0; seed_in = '0;
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    expect_vec(lp_initial(SEED, TAPS), "before first step");
    test_en = 1'b1;
    @(posedge clk); #1; expect_vec(8'b1010_1011, "T1");
    @(posedge clk); #1; expect_vec(8'b1010_1111, "Ta");
    @(posedge clk); #1; expect_vec(8'b1010_0101, "Tb");
    @(posedge clk); #1; expect_vec(8'b1111_0101, "Tc");
    @(posedge clk); #1; expect_vec(8'b0101_0101, "T2");
    checks++;
    if (phase != PH_T) failures++;

    // Long run against the model: the plain-LFSR state is now p0 = Tb of step 1
    p0 = 8'b1010_0101;
    idx = 1;  // next vector is Ta of the current step
    prev = lp_out; t_prev = lp_out; trans = 0;
    for (int k = 0; k < 1000; k++) begin
      test_en = 1'($urandom_range(0, 4) != 0);
      @(posedge clk); #1;
      if (!test_en) begin
        expect_vec(prev, "hold");
        continue;
      end
      expect_vec(lp_vector(p0, TAPS, idx), $sformatf("step %0d idx %0d", k, idx));
      // only one half changes per step
      checks++;
      if ((lp_out[7:4] != prev[7:4]) && (lp_out[3:0] != prev[3:0])) begin
        failures++;
        $display("FAIL both halves changed at step %0d", k);
      end
      trans += popcount8(lp_out ^ prev);
      prev = lp_out;
      if (idx == 3) begin
        p0 = lfsr_step(p0, TAPS);
        idx = 0;
      end else begin
        idx++;
      end
      if (idx == 1) begin  // a T vector has just been shown
        checks++;
        if (trans != popcount8(lp_out ^ t_prev)) begin
          failures++;
          $display("FAIL transitions %0d vs distance %0d", trans, popcount8(lp_out ^ t_prev));
        end
        trans = 0;
        t_prev = lp_out;
      end
    end

    // Seed reload restarts the sequence from the new seed
    test_en = 1'b0;
    seed_in = 8'($urandom);
    seed_load = 1'b1;
    @(posedge clk); #1;
    seed_load = 1'b0;
    expect_vec(lp_initial(seed_in, TAPS), "after seed load");
    test_en = 1'b1;
    p0 = seed_in;
    for (int k = 0; k < 40; k++) begin
      @(posedge clk); #1;
      expect_vec(lp_vector(p0, TAPS, k % 4), "after reload");
      if (k % 4 == 3) p0 = lfsr_step(p0, TAPS);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
