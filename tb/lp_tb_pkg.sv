// lp_tb_pkg: reference models used by the testbenches, written from the
// behaviour the design should have rather than from its RTL.
//
//  * lfsr_step: one full shift of a plain external-XOR LFSR (bit W-1 is
//    flip-flop 1, fed by the XOR of the tapped flip-flops).
//  * injector: keep a bit whose next value equals its present one, else r.
//  * lp_vectors: the four vectors T, Ta, Tb, Tc the low-power generator shows
//    while the plain LFSR moves from p0 to p1 (p2 is the state after p1).
//  * c17_nets: the six gate outputs of the fault-free C17.
//  * c17_model: the C17 benchmark in sum-of-products form, with an optional
//    stuck-at fault on one of its 11 nets.
package lp_tb_pkg;

  function automatic logic [7:0] lfsr_step(input logic [7:0] s, input logic [7:0] taps);
    return {^(s & taps), s[7:1]};
  endfunction

  function automatic logic [3:0] injector(input logic [3:0] cur, input logic [3:0] nxt,
                                          input logic r);
    logic [3:0] o;
    for (int i = 0; i < 4; i++) o[i] = (cur[i] ^ nxt[i]) ? r : cur[i];
    return o;
  endfunction

  // idx: 0 = T, 1 = Ta, 2 = Tb, 3 = Tc
  function automatic logic [7:0] lp_vector(input logic [7:0] p0, input logic [7:0] taps,
                                           input int idx);
    logic [7:0] p1, p2;
    p1 = lfsr_step(p0, taps);
    p2 = lfsr_step(p1, taps);
    case (idx)
      0:       return {p1[7:4], p0[3:0]};
      1:       return {p1[7:4], injector(p0[3:0], p1[3:0], p0[0])};
      2:       return p1;
      default: return {injector(p1[7:4], p2[7:4], p1[0]), p1[3:0]};
    endcase
  endfunction

  // Vector shown before the first step: the Tc form of the seed.
  function automatic logic [7:0] lp_initial(input logic [7:0] s, input logic [7:0] taps);
    logic [7:0] s1;
    s1 = lfsr_step(s, taps);
    return {injector(s[7:4], s1[7:4], s[0]), s[3:0]};
  endfunction

  // site 0..4: input x<site>; 5..10: NAND1..NAND6 output.
  function automatic logic [1:0] c17_model(input logic [4:0] x, input logic fen,
                                           input int site, input logic sa);
    logic [4:0] v;
    logic a1, a2, a3, a4, a5, a6;
    v = x;
    if (fen && site < 5) v[site] = sa;
    a1 = !(v[0] && v[1]);               if (fen && site == 5)  a1 = sa;
    a2 = !(v[1] && v[3]);               if (fen && site == 6)  a2 = sa;
    a3 = !v[2] || !a2;                  if (fen && site == 7)  a3 = sa;
    a4 = !a2 || !v[4];                  if (fen && site == 8)  a4 = sa;
    a5 = !a1 || !a3;                    if (fen && site == 9)  a5 = sa;
    a6 = !a3 || !a4;                    if (fen && site == 10) a6 = sa;
    return {a6, a5};
  endfunction

  // All six gate outputs of the fault-free C17, NAND1 in bit 0.
  function automatic logic [5:0] c17_nets(input logic [4:0] v);
    logic a1, a2, a3, a4, a5, a6;
    a1 = !(v[0] && v[1]);
    a2 = !(v[1] && v[3]);
    a3 = !v[2] || !a2;
    a4 = !a2 || !v[4];
    a5 = !a1 || !a3;
    a6 = !a3 || !a4;
    return {a6, a5, a4, a3, a2, a1};
  endfunction

  function automatic int popcount8(input logic [7:0] v);
    int n = 0;
    for (int i = 0; i < 8; i++) n += int'(v[i]);
    return n;
  endfunction

endpackage
