// ror -- redundant OR collector (R-OR): the last stage of a DEFCON monitor,
// producing the two alarm outputs from one LUT6.
//
// The upper cone computes alarm1 = a0 | b0 and the lower cone alarm2 = a1 | b1,
// each table written so that it ignores the other cone's inputs. In the
// monitor the root of the j collector tree drives a0 and a1 and the root of
// the k tree drives b0 and b1 (the two inputs fan out to both cones), so a
// mismatch seen by either tree raises both alarms, and a fault in one cone
// leaves the other alarm working. correct_sw on in[4] switches both cones to
// their redundant table copy. in[5] is tied high (dual-output mode).
// Outputs are combinational. Configuration chain: see frac_lut6.
module ror
  import defcon_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic cfg_en,
  input  logic ccff_head,
  output logic ccff_tail,
  input  logic a0,
  input  logic b0,
  input  logic a1,
  input  logic b1,
  input  logic correct_sw,
  output logic alarm1,
  output logic alarm2
);

  logic [1:0] out;

  frac_lut6 #(.INIT(gate_cfg(G_ROR))) u_lut (
    .clk, .rst_n, .cfg_en, .ccff_head, .ccff_tail,
    .in  ({1'b1, correct_sw, b1, a1, b0, a0}),
    .out (out)
  );

  assign alarm1 = out[0];
  assign alarm2 = out[1];

endmodule
