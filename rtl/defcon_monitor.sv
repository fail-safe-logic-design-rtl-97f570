// defcon_monitor -- DEFCON duplication-with-comparison monitor for N pairs of
// redundant functional-unit output bits.
//
// Two copies of a functional unit produce the same N-bit output. Each bit is
// brought to the monitor four times: unit 0 and unit 1 on a first pair of
// wires (f0_r0, f1_r0) and again on a second, separately routed pair
// (f0_r1, f1_r1). One rxor LUT per bit compares both pairs independently and
// yields two mismatch flags, j and k. The N j flags are ORed by one
// nror_tree, the N k flags by a second nror_tree, so the two copies never
// share a LUT. A final ror LUT combines both tree roots into alarm[0]
// (alarm1) and alarm[1] (alarm2); both roots feed both of its cones, so any
// mismatch raises both alarms and a single fault inside the monitor can
// silence at most one of them.
//
// correct_sw drives in[4] of every rxor and of the ror: when only one alarm
// is up, raising it checks whether the cause was an upset in the first copy
// of a truth table, and if the alarm drops the monitor keeps working on the
// redundant copy.
//
// Size: N rxor + 2 * nror_luts(N) nror + 1 ror LUTs (183 for N = 128, 47 for
// N = 32, 6 for N = 3). Timing: alarm is combinational from the inputs.
// Configuration chain order: rxor bit 0 .. N-1, j tree, k tree, ror; its
// length is monitor_luts(N) * CFG_W bits.
module defcon_monitor
  import defcon_pkg::*;
#(
  parameter int unsigned N = 128
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
  output logic [1:0]   alarm
);

  logic [N-1:0] j, k;
  logic [N:0]   chain;
  logic         j_root, k_root;
  logic         c_jk, c_kr;

  assign chain[0] = ccff_head;

  for (genvar i = 0; i < N; i++) begin : g_xor
    rxor u_rxor (
      .clk, .rst_n, .cfg_en,
      .ccff_head (chain[i]),
      .ccff_tail (chain[i+1]),
      .a00       (f0_r0[i]),
      .a10       (f1_r0[i]),
      .a01       (f0_r1[i]),
      .a11       (f1_r1[i]),
      .correct_sw,
      .j         (j[i]),
      .k         (k[i])
    );
  end

  nror_tree #(.W(N)) u_jtree (
    .clk, .rst_n, .cfg_en,
    .ccff_head (chain[N]),
    .ccff_tail (c_jk),
    .x         (j),
    .y         (j_root)
  );

  nror_tree #(.W(N)) u_ktree (
    .clk, .rst_n, .cfg_en,
    .ccff_head (c_jk),
    .ccff_tail (c_kr),
    .x         (k),
    .y         (k_root)
  );

  ror u_ror (
    .clk, .rst_n, .cfg_en,
    .ccff_head (c_kr),
    .ccff_tail (ccff_tail),
    .a0        (j_root),
    .b0        (k_root),
    .a1        (j_root),
    .b1        (k_root),
    .correct_sw,
    .alarm1    (alarm[0]),
    .alarm2    (alarm[1])
  );

endmodule
