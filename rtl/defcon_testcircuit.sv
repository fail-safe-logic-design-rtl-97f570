// defcon_testcircuit -- fail-safe monitor for three duplicated output bits
// (A, B, C) of two functional units, with output blocking.
//
// A three-bit defcon_monitor (3 rxor, 2 nror, 1 ror LUTs) compares the two
// units, each bit arriving on two separately routed wire pairs. Two block2
// LUTs then pass unit 1's second copy of A, B and C to fs[2:0] while both
// alarms are 0 and force fs to the fail-safe value 0 when either alarm is
// up. C uses the upper cone of the second block2 LUT; its lower cone is left
// unused. The alarms are meant for a kill switch or a recovery controller.
//
// This is the eight-LUT configuration used to evaluate the scheme under
// single functional-unit faults combined with single configuration-memory
// upsets. Everything is combinational from the unit outputs to alarm and
// fs. Configuration chain: monitor, block2 (A, B), block2 (C);
// (monitor_luts(N) + 2) * CFG_W bits.
module defcon_testcircuit
  import defcon_pkg::*;
#(
  localparam int unsigned N = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_en,
  input  logic         ccff_head,
  output logic         ccff_tail,
  input  logic [N-1:0] f0_r0,
  input  logic [N-1:0] f1_r0,
  input  logic [N-1:0] f0_r1,
  input  logic [N-1:0] f1_r1,
  input  logic         correct_sw,
  output logic [1:0]   alarm,
  output logic [N-1:0] fs
);

  logic c_mb, c_bb;
  logic c_unused;

  defcon_monitor #(.N(N)) u_mon (
    .clk, .rst_n, .cfg_en,
    .ccff_head,
    .ccff_tail (c_mb),
    .f0_r0, .f1_r0, .f0_r1, .f1_r1,
    .correct_sw,
    .alarm
  );

  block2 u_block_ab (
    .clk, .rst_n, .cfg_en,
    .ccff_head (c_mb),
    .ccff_tail (c_bb),
    .a         (f1_r1[0]),
    .b         (f1_r1[1]),
    .alarm1    (alarm[0]),
    .alarm2    (alarm[1]),
    .correct_sw,
    .a_fs      (fs[0]),
    .b_fs      (fs[1])
  );

  block2 u_block_c (
    .clk, .rst_n, .cfg_en,
    .ccff_head (c_bb),
    .ccff_tail (ccff_tail),
    .a         (f1_r1[2]),
    .b         (1'b0),
    .alarm1    (alarm[0]),
    .alarm2    (alarm[1]),
    .correct_sw,
    .a_fs      (fs[2]),
    .b_fs      (c_unused)
  );

endmodule
