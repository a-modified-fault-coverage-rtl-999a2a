// lp_injector: injector circuit for one half of the LP-LFSR.
//
// For every bit it compares the flip-flop's present value (cur) with the value
// waiting at its D input (nxt). Where both agree, the bit is passed on
// unchanged; where they differ, the random bit r is passed instead. A bit that
// is about to toggle is thus replaced by the same random value in every
// position, so an intermediate vector lies between the present and the next
// state. Purely combinational.
//
// The compare-and-substitute rule follows the design document; the width is a
// parameter, set by lp_lfsr to half the LFSR length (4 in the document).
module lp_injector #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] cur,  // present flip-flop outputs
  input  logic [W-1:0] nxt,  // flip-flop inputs (next state)
  input  logic         r,    // random substitute bit
  output logic [W-1:0] inj   // injector outputs
);

  always_comb begin
    for (int i = 0; i < int'(W); i++) begin
      inj[i] = (cur[i] == nxt[i]) ? cur[i] : r;
    end
  end

endmodule
