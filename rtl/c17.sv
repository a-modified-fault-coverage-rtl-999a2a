// c17: the ISCAS-85 C17 benchmark, fault free. Used as the reference circuit
// whose response the tested copy is compared with.
//
// Six 2-input NAND gates:
//   n1 = NAND(x0, x1)   n2 = NAND(x1, x3)   n3 = NAND(x2, n2)
//   n4 = NAND(n2, x4)   y0 = n5 = NAND(n1, n3)   y1 = n6 = NAND(n3, n4)
// The netlist is the benchmark's own. Purely combinational.
module c17
  import lp_pkg::*;
(
  input  logic [C17_NUM_IN-1:0]  x,
  output logic [C17_NUM_OUT-1:0] y
);

  logic n1, n2, n3, n4;

  always_comb begin
    n1   = ~(x[0] & x[1]);
    n2   = ~(x[1] & x[3]);
    n3   = ~(x[2] & n2);
    n4   = ~(n2 & x[4]);
    y[0] = ~(n1 & n3);
    y[1] = ~(n3 & n4);
  end

endmodule
