// nror -- non-redundant OR collector (NR-OR): one LUT6 in full six-input
// mode whose single output is the OR of its six inputs.
//
// Redundancy for NR-OR gates comes from the network, not from the LUT: the
// j outputs of the R-XOR checkers are collected by one tree of NR-OR gates
// and the k outputs by a second, separate tree, so the two copies of each
// mismatch signal never share a LUT. Unused inputs are tied to 0 by the
// instantiating tree. The lut6 path (mode = 0, in[5] selects the cone) and
// the lut6 setting of the output MUX are used; out[1] is left unused.
// The output is combinational. Configuration chain: see frac_lut6.
module nror
  import defcon_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_en,
  input  logic       ccff_head,
  output logic       ccff_tail,
  input  logic [5:0] in,
  output logic       y
);

  logic [1:0] out;

  frac_lut6 #(.INIT(gate_cfg(G_NROR))) u_lut (
    .clk, .rst_n, .cfg_en, .ccff_head, .ccff_tail,
    .in  (in),
    .out (out)
  );

  assign y = out[0];

endmodule
