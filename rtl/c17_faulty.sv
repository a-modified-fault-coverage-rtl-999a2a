// c17_faulty: the C17 benchmark as circuit under test, with one selectable
// stuck-at fault.
//
// The same six NAND gates as c17, but every one of the 11 nets (input stems
// x0..x4 at sites 0..4, NAND1..NAND6 outputs at sites 5..10) passes through a
// fault point: when fault.en is set and fault.site names the net, the net is
// forced to fault.sa. A stuck-at on an input stem reaches every gate the input
// feeds. With fault.en low the circuit equals c17. Purely combinational.
//
// That the tested circuit carries stuck-at-0/1 faults follows the document; the
// runtime fault-selection port and the site numbering are this design's
// choices, made so that a testbench can sweep all 22 single stuck-at faults.
module c17_faulty
  import lp_pkg::*;
(
  input  logic [C17_NUM_IN-1:0]  x,
  input  fault_t                 fault,
  output logic [C17_NUM_OUT-1:0] y
);

  function automatic logic fp(input logic v, input logic [3:0] site, input fault_t f);
    return (f.en && (f.site == site)) ? f.sa : v;
  endfunction

  logic [C17_NUM_IN-1:0] xs;
  logic n1, n2, n3, n4, n5, n6;

  always_comb begin
    for (int unsigned i = 0; i < C17_NUM_IN; i++) begin
      xs[i] = fp(x[i], 4'(i), fault);
    end
    n1 = fp(~(xs[0] & xs[1]), 4'd5, fault);
    n2 = fp(~(xs[1] & xs[3]), 4'd6, fault);
    n3 = fp(~(xs[2] & n2),    4'd7, fault);
    n4 = fp(~(n2 & xs[4]),    4'd8, fault);
    n5 = fp(~(n1 & n3),       4'd9, fault);
    n6 = fp(~(n3 & n4),       4'd10, fault);
    y  = {n6, n5};
  end

endmodule
