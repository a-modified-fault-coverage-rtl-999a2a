// lp_phase_ctrl: sequencer of the LP-LFSR's four-step algorithm.
//
// A 2-bit register holds the kind of vector the LP-LFSR currently shows
// (lp_pkg::lp_phase_e). Each clock with test_en high advances it one step:
//   Tc -> T  : clock the first half and the shaded hold flip-flop
//   T  -> Ta : clock nothing; second half of the output comes from the injector
//   Ta -> Tb : clock the second half
//   Tb -> Tc : clock nothing; first half of the output comes from the injector
// en_first / en_second are the clock enables for the edge that ends the
// current cycle; inj_first / inj_second select the injector for the vector
// currently shown. With test_en low everything holds.
//
// Reset and restart put the register in Tc, so that the first enabled clock
// produces the LFSR vector T1 from the seed, as in the document's example.
// The reset value, the synchronous active-high reset and the restart input
// are this design's choices.
module lp_phase_ctrl
  import lp_pkg::*;
(
  input  logic      clk,
  input  logic      rst,        // synchronous, active high
  input  logic      restart,    // synchronous: back to Tc (seed load)
  input  logic      test_en,    // advance one step per clock
  output lp_phase_e phase,      // kind of vector shown now
  output logic      en_first,   // clock first half + hold flop at this edge
  output logic      en_second,  // clock second half at this edge
  output logic      inj_first,  // first half of output from injector
  output logic      inj_second  // second half of output from injector
);

  lp_phase_e phase_q;

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      phase_q <= PH_C;
    end else if (test_en) begin
      phase_q <= lp_phase_e'(phase_q + 2'd1);
    end
  end

  always_comb begin
    phase      = phase_q;
    en_first   = test_en && !restart && (phase_q == PH_C);
    en_second  = test_en && !restart && (phase_q == PH_A);
    inj_first  = (phase_q == PH_C);
    inj_second = (phase_q == PH_A);
  end

endmodule
