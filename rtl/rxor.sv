// rxor -- redundant XOR checker (R-XOR): two independent comparators for one
// duplicated functional-unit output bit, packed into a single LUT6.
//
// Inputs a00/a10 are the bit from unit 0 and unit 1 on the first pair of
// wires, a01/a11 the same two bits on a second, separately routed pair. The
// upper cone computes j = a00 ^ a10 and its truth table repeats that XOR for
// every value of a01/a11; the lower cone computes k = a01 ^ a11 and repeats it
// for every value of a00/a10. A stuck input or a flipped configuration bit on
// one pair therefore cannot mask the comparison made on the other pair.
// correct_sw (LUT input in[4]) switches both cones to their second,
// identical copy of the table (configuration bits 16..31 and 48..63), which
// repairs an upset in the first copy without reprogramming.
//
// in[5] is tied high and the LUT is programmed in dual-output mode, as the
// monitor requires; the assignment of a00..a11 to in[0..3] is this design's
// choice. j and k are combinational. Configuration chain: see frac_lut6.
module rxor
  import defcon_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic cfg_en,
  input  logic ccff_head,
  output logic ccff_tail,
  input  logic a00,
  input  logic a10,
  input  logic a01,
  input  logic a11,
  input  logic correct_sw,
  output logic j,
  output logic k
);

  logic [1:0] out;

  frac_lut6 #(.INIT(gate_cfg(G_RXOR))) u_lut (
    .clk, .rst_n, .cfg_en, .ccff_head, .ccff_tail,
    .in  ({1'b1, correct_sw, a11, a01, a10, a00}),
    .out (out)
  );

  assign j = out[0];
  assign k = out[1];

endmodule
