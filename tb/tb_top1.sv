// tb_top1: end-to-end test of the low-power BIST at its default parameters
// (8-bit LP-LFSR, x^8 + x + 1, seed 0100_1011, 64 vectors per session).
//
// 1. Normal mode: random functional inputs reach both C17 copies, nothing is
//    compared even with a fault present.
// 2. One BIST session with no fault and one for each of the 22 single stuck-at
//    faults. Every cycle of a session the vector on lfsrout1, both circuit
//    responses and result are compared with the reference models; the session
//    must last exactly 64 vector cycles; afterwards error_o, mismatches_o and
//    irq_o must match what the model predicts, and the interrupt is cleared.
// 3. A session from a random seed supplied on seed_i.
// It reports the fault coverage of the default session and counts each
// mechanism (the four vector kinds, injector substitution, seed load, test and
// normal mode, interrupt raise and clear, done); one that never happens is a
// failure.
module tb_top1;
  import lp_pkg::*;
  import lp_tb_pkg::*;

  localparam logic [7:0] TAPS = 8'b1000_0001;
  localparam logic [7:0] SEED = 8'b0100_1011;
  localparam int         NV   = 64;

  logic       clk = 1'b0, rst, start_i, interrupt_clear_i;
  logic [7:0] seed_i;
  logic [4:0] func_i;
  fault_t     fault_i;
  logic [8:0] lfsrout1;
  logic [1:0] testedout, referenceout;
  logic       result, error_o, test_mode_o, done_o, irq_o;
  lp_phase_e  phase_o;
  logic [7:0] mismatches_o;

  top1 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ph[4];
  int n_inject = 0, n_seed = 0, n_normal = 0, n_test = 0, n_irq = 0, n_irq_clear = 0;
  int n_done = 0, n_detected = 0, n_exp_detected = 0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [4:0] cut_of(input logic [7:0] v);
    logic [4:0] x;
    for (int i = 0; i < 5; i++) x[i] = v[7-i];
    return x;
  endfunction

  // One BIST session; returns whether the model expects detection.
  task automatic session(input logic [7:0] seed, input int f);
    logic [7:0] p0, v, p1;
    logic [4:0] x;
    logic [1:0] good, bad;
    int cyc, exp_mis, idx;
    bit fen;
    fen = (f >= 0);
    fault_i.en   = fen;
    fault_i.site = fen ? 4'(f / 2) : 4'd0;
    fault_i.sa   = fen ? 1'(f % 2) : 1'b0;
    seed_i = seed;
    start_i = 1'b1;
    @(posedge clk); #1;
    chk(test_mode_o && !done_o, "seed-load cycle in test mode");
    @(posedge clk); #1;
    n_seed++;
    p0 = seed;
    cyc = 0;
    exp_mis = 0;
    while (!done_o && cyc < 10 * NV) begin
      n_test++;
      if (cyc == 0) begin
        v = lp_initial(seed, TAPS);
        idx = 3;
      end else begin
        idx = (cyc - 1) % 4;
        v = lp_vector(p0, TAPS, idx);
        if (idx == 3) begin
          p1 = lfsr_step(p0, TAPS);
          if (((p1[7:4] ^ lfsr_step(p1, TAPS)[7:4]) != 0)) n_inject++;
          p0 = p1;
        end else if (idx == 1) begin
          if ((p0[3:0] ^ lfsr_step(p0, TAPS)[3:0]) != 0) n_inject++;
        end
      end
      n_ph[int'(phase_o)]++;
      chk(int'(phase_o) == ((cyc == 0) ? 3 : idx), "phase");
      chk(lfsrout1[7:0] == v, $sformatf("vector %0d: got %b expected %b", cyc, lfsrout1[7:0], v));
      x    = cut_of(v);
      good = c17_model(x, 1'b0, 0, 1'b0);
      bad  = c17_model(x, fen, int'(fault_i.site), fault_i.sa);
      chk(referenceout == good && testedout == bad, "responses");
      chk(result == (good != bad), "result");
      if (good != bad) exp_mis++;
      @(posedge clk); #1;
      cyc++;
    end
    chk(cyc == NV, $sformatf("session length %0d", cyc));
    n_done++;
    chk(error_o == (exp_mis > 0), "error flag");
    chk(int'(mismatches_o) == exp_mis, "mismatch count");
    chk(irq_o == (exp_mis > 0), "interrupt");
    if (fen && exp_mis > 0) n_exp_detected++;
    if (fen && error_o) n_detected++;
    if (irq_o) begin
      n_irq++;
      interrupt_clear_i = 1'b1;
      @(posedge clk); #1;
      interrupt_clear_i = 1'b0;
      chk(!irq_o, "interrupt cleared");
      if (!irq_o) n_irq_clear++;
    end
    start_i = 1'b0;
    @(posedge clk); #1;
    chk(!test_mode_o, "back to normal mode");
  endtask

  initial begin
    rst = 1'b1; start_i = 1'b0; interrupt_clear_i = 1'b0;
    seed_i = '0; func_i = '0; fault_i = '0;
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;

    // normal mode, with and without a fault
    for (int k = 0; k < 40; k++) begin
      func_i = 5'($urandom);
      fault_i.en = 1'(k >= 20);
      fault_i.site = 4'($urandom_range(0, 10));
      fault_i.sa = 1'($urandom);
      @(posedge clk); #1;
      n_normal++;
      chk(!test_mode_o, "normal mode");
      chk(referenceout == c17_model(func_i, 1'b0, 0, 1'b0), "normal-mode reference");
      chk(testedout == c17_model(func_i, fault_i.en, int'(fault_i.site), fault_i.sa),
          "normal-mode tested");
      chk(!result && !irq_o, "no compare in normal mode");
    end

    for (int f = -1; f < 22; f++) session(SEED, f);
    $display("fault coverage with seed %b, %0d vectors: %0d of 22 stuck-at faults",
             SEED, NV, n_detected);
    chk(n_detected == n_exp_detected, "coverage matches model");

    session(8'($urandom), 2 * int'($urandom_range(0, 10)) + 1);

    chk(n_ph[0] > 0 && n_ph[1] > 0 && n_ph[2] > 0 && n_ph[3] > 0, "all four vector kinds");
    chk(n_inject > 0, "injector substitution");
    chk(n_seed > 0 && n_normal > 0 && n_test > 0 && n_done > 0, "modes and seed load");
    chk(n_irq > 0 && n_irq_clear > 0, "interrupt raise and clear");
    $display("mechanisms: T=%0d Ta=%0d Tb=%0d Tc=%0d inject=%0d seed=%0d normal=%0d test=%0d irq=%0d clear=%0d done=%0d",
             n_ph[0], n_ph[1], n_ph[2], n_ph[3], n_inject, n_seed, n_normal, n_test,
             n_irq, n_irq_clear, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
