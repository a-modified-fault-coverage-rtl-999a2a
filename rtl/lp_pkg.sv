// lp_pkg: types and constants shared by the low-power BIST pattern generator
// and its C17 test harness.
//
// lp_phase_e names the kind of vector the LP-LFSR is presenting on its outputs.
// One full cycle is T -> Ta -> Tb -> Tc, after which the next LFSR vector T
// follows. Between two LFSR vectors T1 and T2 the generator therefore inserts
// the three intermediate vectors Ta, Tb and Tc.
//
// The C17 constants describe the ISCAS-85 C17 benchmark used as the circuit
// under test: 5 primary inputs, 2 primary outputs, 6 NAND gates, and 11 nets
// (5 input stems plus 6 gate outputs) that can carry a stuck-at fault.
package lp_pkg;

  typedef enum logic [1:0] {
    PH_T = 2'd0,  // LFSR vector: first half has just shifted
    PH_A = 2'd1,  // Ta: first half held, second half from the injector
    PH_B = 2'd2,  // Tb: second half has just shifted
    PH_C = 2'd3   // Tc: first half from the injector, second half held
  } lp_phase_e;

  localparam int unsigned C17_NUM_IN    = 5;
  localparam int unsigned C17_NUM_OUT   = 2;
  localparam int unsigned C17_NUM_SITES = 11;  // x0..x4, then NAND1..NAND6

  // Stuck-at fault selection for the tested circuit.
  typedef struct packed {
    logic       en;    // 1: the fault is present
    logic [3:0] site;  // 0..4: input xN, 5..10: output of NAND(site-4)
    logic       sa;    // stuck-at value
  } fault_t;

endpackage
