// defcon_dpr_region -- fail-safe wrapper around two lock-stepped encryption
// engines: two DEFCON monitors, sticky alarms and a blocked read-out bus.
//
// The two engines (outside this module) expose their DW-bit round
// registers as state1 and state2. DEFCON1, a DW-bit defcon_monitor, compares
// them in every cycle, so a mismatch in any round is caught. Each engine's
// ciphertext is read out BW bits at a time through its own readout_mux
// (read1ub from engine 1, read2 from engine 2); DEFCON2, a BW-bit monitor,
// compares the two read buses. The four unregistered alarms (alarm_ur:
// DEFCON1 alarm1/alarm2, DEFCON2 alarm1/alarm2) are captured by sticky
// alarm_reg registers (alarm_r), cleared by start. A block_bus gates
// read1ub to read1b: once any registered alarm is 1, read1b is all zeros.
// read1ub and read2 are brought out for diagnosis only; a fielded system
// would use read1b and the registered alarms alone.
//
// Sizes: 183 + 47 monitor LUTs and 34 blocking LUTs at DW = 128, BW = 32.
// The second wire pair of each monitored bit is the same net as the first
// here (the replicas are distinct only in the routing of a placed design).
// Timing: alarm_ur is combinational; alarm_r follows one clock later; a
// read returns one clock after rd_start and is blocked combinationally by
// alarm_r. Configuration chain: DEFCON1, DEFCON2, block_bus.
module defcon_dpr_region
  import defcon_pkg::*;
#(
  parameter int unsigned DW = 128,
  parameter int unsigned BW = 32,
  localparam int unsigned AW = (DW / BW > 1) ? $clog2(DW / BW) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_en,
  input  logic          ccff_head,
  output logic          ccff_tail,
  input  logic [DW-1:0] state1,
  input  logic [DW-1:0] state2,
  input  logic          start,
  input  logic          rd_start1,
  input  logic [AW-1:0] rd_addr1,
  input  logic          rd_start2,
  input  logic [AW-1:0] rd_addr2,
  input  logic          correct_sw,
  output logic [BW-1:0] read1b,
  output logic [BW-1:0] read1ub,
  output logic [BW-1:0] read2,
  output logic [3:0]    alarm_r,
  output logic [3:0]    alarm_ur
);

  logic c_12, c_2b;

  defcon_monitor #(.N(DW)) u_defcon1 (
    .clk, .rst_n, .cfg_en,
    .ccff_head,
    .ccff_tail (c_12),
    .f0_r0     (state1),
    .f1_r0     (state2),
    .f0_r1     (state1),
    .f1_r1     (state2),
    .correct_sw,
    .alarm     (alarm_ur[1:0])
  );

  readout_mux #(.DW(DW), .BW(BW)) u_rd1 (
    .clk, .rst_n,
    .start (rd_start1),
    .addr  (rd_addr1),
    .ct    (state1),
    .rd    (read1ub)
  );

  readout_mux #(.DW(DW), .BW(BW)) u_rd2 (
    .clk, .rst_n,
    .start (rd_start2),
    .addr  (rd_addr2),
    .ct    (state2),
    .rd    (read2)
  );

  defcon_monitor #(.N(BW)) u_defcon2 (
    .clk, .rst_n, .cfg_en,
    .ccff_head (c_12),
    .ccff_tail (c_2b),
    .f0_r0     (read1ub),
    .f1_r0     (read2),
    .f0_r1     (read1ub),
    .f1_r1     (read2),
    .correct_sw,
    .alarm     (alarm_ur[3:2])
  );

  alarm_reg #(.W(4)) u_alarms (
    .clk, .rst_n,
    .clr      (start),
    .alarm_ur (alarm_ur),
    .alarm_r  (alarm_r)
  );

  block_bus #(.W(BW)) u_block (
    .clk, .rst_n, .cfg_en,
    .ccff_head (c_2b),
    .ccff_tail,
    .alarm_r,
    .correct_sw,
    .d         (read1ub),
    .q         (read1b)
  );

endmodule
