// bist_ctrl: BIST control unit.
//
// Puts the circuit under test in normal or test mode, feeds the seed to the
// LP-LFSR, runs the pattern generator for NUM_VECTORS vectors (LFSR vectors and
// intermediate vectors alike), enables the response analyzer while vectors are
// applied, and raises an interrupt when the analyzer reports an error. The
// interrupt stays set until interrupt_clear_i.
//
// States: NORMAL (functional inputs reach the CUT) -> start_i -> SEED (one
// cycle: load seed, clear analyzer) -> RUN (NUM_VECTORS cycles, one vector
// each, analyzer enabled) -> DONE (done_o high, test mode kept) -> start_i low
// -> NORMAL. An error in the same cycle as interrupt_clear_i keeps the
// interrupt set.
//
// The duties of the unit and the interrupt_clear_i name follow the design
// document; the state sequence, the one-cycle seed load, the vector count and
// the interrupt priority are this design's choices.
module bist_ctrl #(
  parameter int unsigned NUM_VECTORS = 64
) (
  input  logic clk,
  input  logic rst,                // synchronous, active high
  input  logic start_i,            // request a test session (level)
  input  logic error_i,            // analyzer reports a mismatch this cycle
  input  logic interrupt_clear_i,  // clear the interrupt
  output logic test_mode_o,        // 1: CUT inputs from the pattern generator
  output logic seed_load_o,        // load the seed into the LP-LFSR
  output logic test_en_o,          // LP-LFSR advances one step per clock
  output logic tra_en_o,           // analyzer compares this cycle
  output logic tra_clear_o,        // analyzer clears its sticky state
  output logic done_o,             // session finished
  output logic irq_o               // error interrupt
);

  typedef enum logic [1:0] {S_NORMAL, S_SEED, S_RUN, S_DONE} state_e;

  localparam int unsigned CW = (NUM_VECTORS > 1) ? $clog2(NUM_VECTORS) : 1;

  state_e        state_q;
  logic [CW-1:0] count_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_NORMAL;
      count_q <= '0;
    end else begin
      unique case (state_q)
        S_NORMAL: if (start_i) state_q <= S_SEED;
        S_SEED: begin
          state_q <= S_RUN;
          count_q <= '0;
        end
        S_RUN: begin
          count_q <= count_q + 1'b1;
          if (count_q == CW'(NUM_VECTORS - 1)) state_q <= S_DONE;
        end
        S_DONE: if (!start_i) state_q <= S_NORMAL;
        default: state_q <= S_NORMAL;
      endcase
    end
  end

  always_comb begin
    test_mode_o = (state_q != S_NORMAL);
    seed_load_o = (state_q == S_SEED);
    tra_clear_o = (state_q == S_SEED);
    test_en_o   = (state_q == S_RUN);
    tra_en_o    = (state_q == S_RUN);
    done_o      = (state_q == S_DONE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      irq_o <= 1'b0;
    end else begin
      irq_o <= (irq_o && !interrupt_clear_i) || (tra_en_o && error_i);
    end
  end

endmodule
