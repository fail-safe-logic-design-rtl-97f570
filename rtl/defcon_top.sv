// defcon_top -- both DEFCON configurations side by side.
//
// z_*: defcon_dpr_region, the 128-bit round-register / 32-bit read-out
//      monitor pair with sticky alarms and a blocked read bus, placed next to
//      two duplicated encryption engines whose registers arrive on z_state1
//      and z_state2.
// t_*: defcon_testcircuit, the three-bit monitor with output blocking.
// c_*: defcon_clb_testcircuit, the same three-bit monitor placed in one
//      configurable logic block, whose routing bits can be upset too.
// The three share only the clock and the reset; each has its own
// configuration chain with its own shift enable (z_cfg_en/z_ccff_*, ...)
// so that one can be rewritten while the others keep their configuration,
// and its own correct_sw.
// Timing is that of the two sub-blocks.
module defcon_top
  import defcon_pkg::*;
#(
  parameter int unsigned DW = 128,
  parameter int unsigned BW = 32,
  localparam int unsigned AW = (DW / BW > 1) ? $clog2(DW / BW) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // encryption-engine monitor
  input  logic          z_cfg_en,
  input  logic          z_ccff_head,
  output logic          z_ccff_tail,
  input  logic [DW-1:0] z_state1,
  input  logic [DW-1:0] z_state2,
  input  logic          z_start,
  input  logic          z_rd_start1,
  input  logic [AW-1:0] z_rd_addr1,
  input  logic          z_rd_start2,
  input  logic [AW-1:0] z_rd_addr2,
  input  logic          z_correct_sw,
  output logic [BW-1:0] z_read1b,
  output logic [BW-1:0] z_read1ub,
  output logic [BW-1:0] z_read2,
  output logic [3:0]    z_alarm_r,
  output logic [3:0]    z_alarm_ur,
  // three-output test circuit
  input  logic          t_cfg_en,
  input  logic          t_ccff_head,
  output logic          t_ccff_tail,
  input  logic [2:0]    t_f0_r0,
  input  logic [2:0]    t_f1_r0,
  input  logic [2:0]    t_f0_r1,
  input  logic [2:0]    t_f1_r1,
  input  logic          t_correct_sw,
  output logic [1:0]    t_alarm,
  output logic [2:0]    t_fs,
  // the test circuit placed in a logic block
  input  logic          c_cfg_en,
  input  logic          c_ccff_head,
  output logic          c_ccff_tail,
  input  logic [2:0]    c_f0_r0,
  input  logic [2:0]    c_f1_r0,
  input  logic [2:0]    c_f0_r1,
  input  logic [2:0]    c_f1_r1,
  input  logic          c_correct_sw,
  output logic [1:0]    c_alarm,
  output logic [2:0]    c_fs
);

  defcon_dpr_region #(.DW(DW), .BW(BW)) u_dpr (
    .clk, .rst_n,
    .cfg_en     (z_cfg_en),
    .ccff_head  (z_ccff_head),
    .ccff_tail  (z_ccff_tail),
    .state1     (z_state1),
    .state2     (z_state2),
    .start      (z_start),
    .rd_start1  (z_rd_start1),
    .rd_addr1   (z_rd_addr1),
    .rd_start2  (z_rd_start2),
    .rd_addr2   (z_rd_addr2),
    .correct_sw (z_correct_sw),
    .read1b     (z_read1b),
    .read1ub    (z_read1ub),
    .read2      (z_read2),
    .alarm_r    (z_alarm_r),
    .alarm_ur   (z_alarm_ur)
  );

  defcon_testcircuit u_test (
    .clk, .rst_n,
    .cfg_en     (t_cfg_en),
    .ccff_head  (t_ccff_head),
    .ccff_tail  (t_ccff_tail),
    .f0_r0      (t_f0_r0),
    .f1_r0      (t_f1_r0),
    .f0_r1      (t_f0_r1),
    .f1_r1      (t_f1_r1),
    .correct_sw (t_correct_sw),
    .alarm      (t_alarm),
    .fs         (t_fs)
  );

  defcon_clb_testcircuit u_clb_test (
    .clk, .rst_n,
    .cfg_en     (c_cfg_en),
    .ccff_head  (c_ccff_head),
    .ccff_tail  (c_ccff_tail),
    .f0_r0      (c_f0_r0),
    .f1_r0      (c_f1_r0),
    .f0_r1      (c_f0_r1),
    .f1_r1      (c_f1_r1),
    .correct_sw (c_correct_sw),
    .alarm      (c_alarm),
    .fs         (c_fs)
  );

endmodule
