// lp_lfsr: low-power LFSR (LP-LFSR) test pattern generator.
//
// An external-XOR LFSR of WIDTH flip-flops is split into a first and a second
// half, each with its own clock enable, plus one extra "shaded" hold flip-flop
// that sits between the halves. Instead of shifting the whole register at once,
// the generator moves from one LFSR vector to the next in four steps, each of
// which changes only part of the output, so the primary inputs of the circuit
// under test toggle less often:
//   T  : first half and hold flop shift; output = flip-flops
//   Ta : nothing shifts; second half of the output from the injector
//   Tb : second half shifts (its serial input is the hold flop); output = flip-flops
//   Tc : nothing shifts; first half of the output from the injector
// The injector (lp_injector) passes each bit whose next value equals its present
// value and substitutes the random bit R where they differ. R is the last
// flip-flop's output. The hold flop keeps the bit that left the first half at
// step T, so the second half receives the same serial stream a plain LFSR would.
//
// Bit order: q[WIDTH-1] is flip-flop 1 (the one fed by the XOR), q[0] is
// flip-flop WIDTH, so printing lp_out in binary reads flip-flops 1..WIDTH left
// to right. With the defaults (x^8 + x + 1, taps at flip-flops 8 and 1, seed
// 0100_1011) the sequence after reset is 1010_1011, 1010_1111, 1010_0101,
// 1111_0101, 0101_0101, ... exactly as in the document's worked example.
//
// Interface: one vector per clock while test_en is high; lp_out is
// combinational from the flip-flops and the phase. seed_load writes seed_in
// synchronously and restarts the sequence. The seed port, the synchronous
// reset and the value of lp_out before the first step (the Tc form of the
// seed) are this design's choices.
module lp_lfsr
  import lp_pkg::*;
#(
  parameter int unsigned      WIDTH = 8,
  parameter logic [WIDTH-1:0] TAPS  = 8'b1000_0001,  // XOR of flip-flops 1 and 8
  parameter logic [WIDTH-1:0] SEED  = 8'b0100_1011
) (
  input  logic             clk,
  input  logic             rst,        // synchronous, active high: load SEED
  input  logic             test_en,    // test enable: advance one step per clock
  input  logic             seed_load,  // load seed_in (synchronous)
  input  logic [WIDTH-1:0] seed_in,
  output logic [WIDTH-1:0] lp_out,     // low-power test vector
  output logic             hold_q,     // shaded hold flip-flop
  output lp_phase_e        phase       // kind of vector on lp_out
);

  localparam int unsigned H = WIDTH / 2;

  logic [WIDTH-1:0] q;
  logic             fb;
  logic [H-1:0]     d_first, d_second;
  logic [H-1:0]     inj_f, inj_s;
  logic             r;
  logic             en_first, en_second, inj_first, inj_second;

  lp_phase_ctrl u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .restart    (seed_load),
    .test_en    (test_en),
    .phase      (phase),
    .en_first   (en_first),
    .en_second  (en_second),
    .inj_first  (inj_first),
    .inj_second (inj_second)
  );

  // Next values at the D inputs of the two halves.
  assign fb       = ^(q & TAPS);
  assign d_first  = {fb, q[WIDTH-1:H+1]};
  assign d_second = {hold_q, q[H-1:1]};
  assign r        = q[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      q      <= SEED;
      hold_q <= SEED[H];
    end else if (seed_load) begin
      q      <= seed_in;
      hold_q <= seed_in[H];
    end else begin
      if (en_first) begin
        q[WIDTH-1:H] <= d_first;
        hold_q       <= q[H];
      end
      if (en_second) begin
        q[H-1:0] <= d_second;
      end
    end
  end

  lp_injector #(.W(H)) u_inj_first  (.cur(q[WIDTH-1:H]), .nxt(d_first),  .r(r), .inj(inj_f));
  lp_injector #(.W(H)) u_inj_second (.cur(q[H-1:0]),     .nxt(d_second), .r(r), .inj(inj_s));

  assign lp_out = {inj_first  ? inj_f : q[WIDTH-1:H],
                   inj_second ? inj_s : q[H-1:0]};

endmodule
