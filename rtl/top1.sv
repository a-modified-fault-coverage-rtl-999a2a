// top1: low-power BIST around the C17 benchmark.
//
// The LP-LFSR (lp_lfsr) produces test vectors with three intermediate vectors
// between successive LFSR states. In test mode its first five outputs
// (flip-flops 1..5) drive the primary inputs x0..x4 of two copies of C17: the
// tested circuit (c17_faulty, which can carry one stuck-at fault) and the
// fault-free reference circuit (c17). comparemod compares the two responses
// every cycle and reports a mismatch on result. The control unit (bist_ctrl)
// selects normal or test mode, loads the seed, runs the session and raises
// irq_o on an error; interrupt_clear_i clears it. In normal mode func_i drives
// both circuits and nothing is compared.
//
// Timing: after start_i, one seed-load cycle, then NUM_VECTORS cycles with one
// vector each, then done_o. result is combinational from the current vector.
//
// The four units and the outputs lfsrout1[8:0], testedout, referenceout and
// result follow the document's top level; lfsrout1[8] carries the shaded hold
// flip-flop and lfsrout1[7:0] the low-power vector. Which five LFSR outputs
// feed C17, the two-bit width of testedout/referenceout (C17 has two outputs),
// the control unit's place in the top and the fault-selection, seed and
// functional-input ports are this design's choices.
module top1
  import lp_pkg::*;
#(
  parameter int unsigned      WIDTH       = 8,
  parameter logic [WIDTH-1:0] TAPS        = 8'b1000_0001,
  parameter logic [WIDTH-1:0] SEED        = 8'b0100_1011,
  parameter int unsigned      NUM_VECTORS = 64
) (
  input  logic                   clk,
  input  logic                   rst,                // synchronous, active high
  input  logic                   start_i,            // start a BIST session
  input  logic                   interrupt_clear_i,  // clear irq_o
  input  logic [WIDTH-1:0]       seed_i,             // seed loaded at session start
  input  logic [C17_NUM_IN-1:0]  func_i,             // functional inputs (normal mode)
  input  fault_t                 fault_i,            // stuck-at fault in the tested circuit
  output logic [WIDTH:0]         lfsrout1,           // {hold flop, low-power vector}
  output logic [C17_NUM_OUT-1:0] testedout,
  output logic [C17_NUM_OUT-1:0] referenceout,
  output logic                   result,             // responses differ now
  output logic                   error_o,            // a mismatch was seen since start
  output logic                   test_mode_o,
  output logic                   done_o,
  output logic                   irq_o,
  output lp_phase_e              phase_o,            // kind of vector on lfsrout1[7:0]
  output logic [7:0]             mismatches_o        // failing cycles since start
);

  logic                  seed_load, test_en, tra_en, tra_clear;
  logic [WIDTH-1:0]      lp_out;
  logic                  hold_q;
  logic [C17_NUM_IN-1:0] cut_in;

  bist_ctrl #(.NUM_VECTORS(NUM_VECTORS)) u_ctrl (
    .clk               (clk),
    .rst               (rst),
    .start_i           (start_i),
    .error_i           (result),
    .interrupt_clear_i (interrupt_clear_i),
    .test_mode_o       (test_mode_o),
    .seed_load_o       (seed_load),
    .test_en_o         (test_en),
    .tra_en_o          (tra_en),
    .tra_clear_o       (tra_clear),
    .done_o            (done_o),
    .irq_o             (irq_o)
  );

  lp_lfsr #(.WIDTH(WIDTH), .TAPS(TAPS), .SEED(SEED)) u3 (
    .clk       (clk),
    .rst       (rst),
    .test_en   (test_en),
    .seed_load (seed_load),
    .seed_in   (seed_i),
    .lp_out    (lp_out),
    .hold_q    (hold_q),
    .phase     (phase_o)
  );

  assign lfsrout1 = {hold_q, lp_out};

  // Test/normal mode selection of the CUT inputs: x0 <- flip-flop 1, ...
  always_comb begin
    for (int unsigned i = 0; i < C17_NUM_IN; i++) begin
      cut_in[i] = test_mode_o ? lp_out[WIDTH-1-i] : func_i[i];
    end
  end

  c17_faulty u1 (.x(cut_in), .fault(fault_i), .y(testedout));
  c17        u2 (.x(cut_in), .y(referenceout));

  comparemod #(.W(C17_NUM_OUT), .CNT_W(8)) u4 (
    .clk        (clk),
    .rst        (rst),
    .clear      (tra_clear),
    .en         (tra_en),
    .tested_i    (testedout),
    .reference_i (referenceout),
    .result     (result),
    .error_q    (error_o),
    .mismatches (mismatches_o)
  );

endmodule
