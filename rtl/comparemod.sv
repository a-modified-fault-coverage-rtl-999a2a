// comparemod: test response analyzer. Compares the tested circuit's outputs
// with the fault-free reference circuit's outputs.
//
// result is combinational: high in any cycle where en is high and the two
// responses differ. error_q is a sticky flag set by such a cycle and cleared
// by rst or clear; mismatches counts the failing cycles (saturating) so a
// session's result can be read after it ends.
//
// Comparing against a reference copy follows the design document's top level;
// the sticky flag, the counter and its width are this design's choices.
module comparemod #(
  parameter int unsigned W      = 2,
  parameter int unsigned CNT_W  = 8
) (
  input  logic             clk,
  input  logic             rst,          // synchronous, active high
  input  logic             clear,        // clear error_q and mismatches
  input  logic             en,           // compare in this cycle
  input  logic [W-1:0]     tested_i,
  input  logic [W-1:0]     reference_i,
  output logic             result,       // mismatch now
  output logic             error_q,      // a mismatch has been seen
  output logic [CNT_W-1:0] mismatches
);

  assign result = en && (tested_i != reference_i);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      error_q    <= 1'b0;
      mismatches <= '0;
    end else if (result) begin
      error_q <= 1'b1;
      if (mismatches != '1) mismatches <= mismatches + 1'b1;
    end
  end

endmodule
