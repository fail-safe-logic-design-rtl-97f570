// block2 -- output blocking LUT for two functional-unit outputs.
//
// One LUT6 passes the functional-unit bits a and b to a_fs (upper cone) and
// b_fs (lower cone) while both alarms are 0 and forces both outputs to the
// fail-safe value 0 as soon as either alarm is 1. The unit bits come from
// one copy of the duplicated unit. correct_sw on in[4] switches to the
// redundant copy of the table; in[5] is tied high (dual-output mode). The
// input order on in[0..3] (a, b, alarm1, alarm2) is this design's choice.
// Outputs are combinational. Configuration chain: see frac_lut6.
module block2
  import defcon_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic cfg_en,
  input  logic ccff_head,
  output logic ccff_tail,
  input  logic a,
  input  logic b,
  input  logic alarm1,
  input  logic alarm2,
  input  logic correct_sw,
  output logic a_fs,
  output logic b_fs
);

  logic [1:0] out;

  frac_lut6 #(.INIT(gate_cfg(G_BLOCK2))) u_lut (
    .clk, .rst_n, .cfg_en, .ccff_head, .ccff_tail,
    .in  ({1'b1, correct_sw, alarm2, alarm1, b, a}),
    .out (out)
  );

  assign a_fs = out[0];
  assign b_fs = out[1];

endmodule
