// tb_power_c17: switching activity of C17 under test, low-power generator
// against a conventional LFSR with the same polynomial and seed.
//
// The LP-LFSR runs for 1024 clocks (256 LFSR steps) and its first five outputs
// drive a model of C17. The conventional LFSR is modelled for 256 clocks,
// covering the same 256 LFSR states. Toggles are counted on the five primary
// inputs and the six gate outputs. Checks:
//  * per clock, the LP generator toggles the C17 inputs at most half as often
//    as the conventional one (the expected ratio is about one quarter);
//  * gate-output toggles per clock are also lower;
//  * over the whole run the LP generator toggles the inputs no more often in
//    total than the conventional one applied to the same LFSR states, give or
//    take the last vector (the run ends on a Tc vector, which already holds
//    part of the following state).
//  * every Tb vector equals the conventional LFSR state.
// Activity figures are printed; they stand in for the power the design is
// meant to save.
module tb_power_c17;
  import lp_pkg::*;
  import lp_tb_pkg::*;

  localparam logic [7:0] TAPS  = 8'b1000_0001;
  localparam logic [7:0] SEED  = 8'b0100_1011;
  localparam int         STEPS = 256;

  logic       clk = 1'b0, rst, test_en, seed_load;
  logic [7:0] seed_in, lp_out;
  logic       hold_q;
  lp_phase_e  phase;
  int checks = 0, failures = 0;

  lp_lfsr dut (.*);

  always #5 clk = ~clk;

  function automatic logic [4:0] cut_of(input logic [7:0] v);
    logic [4:0] x;
    for (int i = 0; i < 5; i++) x[i] = v[7-i];
    return x;
  endfunction

  function automatic int pc(input logic [7:0] v);
    return popcount8(v);
  endfunction

  int lp_in = 0, lp_gate = 0, cv_in = 0, cv_gate = 0;
  logic [4:0] x_prev, x;
  logic [7:0] s;
  real r_in, r_gate;

  initial begin
    rst = 1'b1; test_en = 1'b0; seed_load = 1'b0; seed_in = '0;
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    // conventional generator: seed, then one LFSR state per clock
    s = SEED;
    x_prev = cut_of(s);
    for (int k = 0; k < STEPS; k++) begin
      s = lfsr_step(s, TAPS);
      x = cut_of(s);
      cv_in   += pc(8'(x ^ x_prev));
      cv_gate += pc(8'(c17_nets(x) ^ c17_nets(x_prev)));
      x_prev = x;
    end
    // low-power generator: four clocks per LFSR state
    test_en = 1'b1;
    // start from the seed itself, as the conventional run does
    x_prev = cut_of(SEED);
    for (int k = 0; k < 4 * STEPS; k++) begin
      @(posedge clk); #1;
      x = cut_of(lp_out);
      lp_in   += pc(8'(x ^ x_prev));
      lp_gate += pc(8'(c17_nets(x) ^ c17_nets(x_prev)));
      x_prev = x;
      if (k % 4 == 2) begin  // Tb: the LP state equals the plain LFSR state
        s = SEED;
        for (int j = 0; j <= k / 4; j++) s = lfsr_step(s, TAPS);
        checks++;
        if (lp_out !== s) begin
          failures++;
          $display("FAIL Tb %0d: %b expected LFSR state %b", k / 4, lp_out, s);
        end
      end
    end
    r_in   = real'(lp_in) / (4.0 * STEPS) / (real'(cv_in) / STEPS);
    r_gate = real'(lp_gate) / (4.0 * STEPS) / (real'(cv_gate) / STEPS);
    $display("C17 input toggles: conventional %0d in %0d clocks, LP-LFSR %0d in %0d clocks",
             cv_in, STEPS, lp_in, 4 * STEPS);
    $display("C17 gate-output toggles: conventional %0d, LP-LFSR %0d", cv_gate, lp_gate);
    $display("per-clock activity ratio LP/conventional: inputs %0.3f, gates %0.3f", r_in, r_gate);
    checks++;
    if (r_in > 0.5) begin failures++; $display("FAIL input activity ratio %0.3f", r_in); end
    checks++;
    if (r_gate >= 1.0) begin failures++; $display("FAIL gate activity ratio %0.3f", r_gate); end
    checks++;
    if (lp_in > cv_in + 8) begin failures++; $display("FAIL total input toggles %0d > %0d", lp_in, cv_in); end
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
