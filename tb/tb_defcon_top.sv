// tb_defcon_top -- end-to-end test of the three DEFCON designs at their
// default sizes (no parameter overrides).
//
// Encryption-engine monitor (z_*): two lock-stepped stand-in engines (a
// keyed 10-round mixing function on a 128-bit register, not AES) run
// complete operations -- start, 10 rounds, four 32-bit reads -- fault-free,
// with a persistent divergence, with a one-round difference, with a read
// address fault, with a monitor upset (false alarm, then correct_sw) and
// finally a campaign of random configuration upsets combined with an engine
// fault, each upset injected and scrubbed through the configuration chain.
// Three-output test circuit (t_*): every unit fault with and without an
// upset, including an upset that registers an R-OR output. The same circuit
// placed in a logic block (c_*) sees the same inputs, and also upsets that
// cut a routing connection.
//
// Each mechanism is counted and must occur at least once: round mismatch
// with both alarm sets (code F), transient mismatch (code 3), read-out
// mismatch, full block, partial block, false alarm, correct_sw repair,
// scrub, detection under a dual fault, delayed alarm through an output
// register, test-circuit detection and blocking, the same in the logic
// block, and detection there under a routing upset.
`timescale 1ns/1ps
module tb_defcon_top;
  import defcon_pkg::*;

  localparam int DW = 128, BW = 32;
  localparam int ZNL = 183 + 47 + 34;
  localparam int ZL  = ZNL * CFG_W;
  localparam int TNL = 8;
  localparam int TL  = TNL * CFG_W;
  localparam int CLB = CLB_LUTS * CFG_W;
  localparam int CL  = CLB + CLB_MUXES * RMUX_W;
  localparam logic [127:0] MIX = 128'h9E3779B97F4A7C15_F39CC0605CEDC834;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0;
  logic zflip = 1'b0, tflip = 1'b0, cflip = 1'b0;
  int chain_sel = 0;
  logic z_head, z_tail, t_head, t_tail, c_head, c_tail;
  logic [DW-1:0] z_state1 = '0, z_state2 = '0;
  logic z_start = 1'b0, z_rd_start1 = 1'b0, z_rd_start2 = 1'b0, z_csw = 1'b0;
  logic [1:0] z_rd_addr1 = '0, z_rd_addr2 = '0;
  logic [BW-1:0] z_read1b, z_read1ub, z_read2;
  logic [3:0] z_alarm_r, z_alarm_ur;
  logic [2:0] t_f0_r0 = '0, t_f1_r0 = '0, t_f0_r1 = '0, t_f1_r1 = '0;
  logic t_csw = 1'b0;
  logic [1:0] t_alarm;
  logic [2:0] t_fs;
  logic [2:0] c_f0_r0, c_f1_r0, c_f0_r1, c_f1_r1;
  logic [1:0] c_alarm;
  logic [2:0] c_fs;

  int checks = 0, failures = 0;
  typedef enum int {
    M_CODE_F, M_CODE_3, M_READ_MISMATCH, M_FULL_BLOCK, M_PARTIAL_BLOCK, M_FALSE_ALARM,
    M_REPAIR, M_SCRUB, M_DUAL_DETECT, M_REG_DELAY, M_T_DETECT, M_T_BLOCK,
    M_C_DETECT, M_C_BLOCK, M_C_ROUTE_DETECT, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  assign z_head = z_tail ^ zflip;
  assign t_head = t_tail ^ tflip;
  assign c_head = c_tail ^ cflip;
  assign c_f0_r0 = t_f0_r0;
  assign c_f1_r0 = t_f1_r0;
  assign c_f0_r1 = t_f0_r1;
  assign c_f1_r1 = t_f1_r1;

  defcon_top dut (
    .clk, .rst_n,
    .z_cfg_en(cfg_en && chain_sel == 0), .t_cfg_en(cfg_en && chain_sel == 1),
    .c_cfg_en(cfg_en && chain_sel == 2),
    .z_ccff_head(z_head), .z_ccff_tail(z_tail), .z_state1, .z_state2, .z_start,
    .z_rd_start1, .z_rd_addr1, .z_rd_start2, .z_rd_addr2, .z_correct_sw(z_csw),
    .z_read1b, .z_read1ub, .z_read2, .z_alarm_r, .z_alarm_ur,
    .t_ccff_head(t_head), .t_ccff_tail(t_tail), .t_f0_r0, .t_f1_r0, .t_f0_r1, .t_f1_r1,
    .t_correct_sw(t_csw), .t_alarm, .t_fs,
    .c_ccff_head(c_head), .c_ccff_tail(c_tail), .c_f0_r0, .c_f1_r0, .c_f0_r1, .c_f1_r1,
    .c_correct_sw(t_csw), .c_alarm, .c_fs);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // rotate one chain once, inverting the bit leaving its tail at step f
  // (chain 0 = z, 1 = t, 2 = c)
  task automatic rotate(input int chain, input int f);
    int n;
    n = (chain == 2) ? CL : (chain == 1) ? TL : ZL;
    chain_sel = chain;
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      cfg_en = 1'b1;
      if (chain == 2)      cflip = (c == f);
      else if (chain == 1) tflip = (c == f);
      else                 zflip = (c == f);
    end
    @(negedge clk);
    cfg_en = 1'b0;
    zflip  = 1'b0;
    tflip  = 1'b0;
    cflip  = 1'b0;
  endtask

  function automatic logic [127:0] round_fn(input logic [127:0] s, input logic [127:0] k, input int r);
    return {s[94:0], s[127:95]} ^ (s >> 7) ^ k ^ (MIX * 128'(r + 1));
  endfunction

  function automatic logic [127:0] rnd128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  // one operation of the engine pair; fault_kind 0 none, 1 divergence from
  // round fr, 2 difference in round fr only, 3 engine-2 read address fault
  task automatic run_op(input int fault_kind, input int fr, output logic [127:0] ct,
                        output logic [127:0] r1b, output logic [127:0] r1ub,
                        output logic [127:0] r2, output logic [3:0] arr,
                        output logic [3:0] aur, output logic [3:0] are);
    logic [127:0] s1, s2, key;
    key = rnd128();
    s1  = rnd128();
    s2  = s1;
    @(negedge clk);
    z_start     = 1'b1;
    z_rd_start1 = 1'b1;
    z_rd_start2 = 1'b1;
    z_rd_addr1  = '0;
    z_rd_addr2  = '0;
    z_state1    = s1;
    z_state2    = s2;
    @(negedge clk);
    z_start     = 1'b0;
    z_rd_start1 = 1'b0;
    z_rd_start2 = 1'b0;
    for (int r = 0; r < 10; r++) begin
      s1 = round_fn(s1, key, r);
      s2 = round_fn(s2, key, r);
      if (fault_kind == 1 && r == fr) s2[fr * 11] = !s2[fr * 11];
      z_state1 = s1;
      z_state2 = s2;
      if (fault_kind == 2 && r == fr) z_state2[100] = !z_state2[100];
      @(negedge clk);
    end
    ct  = s1;
    arr = z_alarm_r;
    aur = z_alarm_ur;
    for (int a = 0; a < 4; a++) begin
      z_rd_addr1  = 2'(a);
      z_rd_addr2  = (fault_kind == 3 && a >= 2) ? 2'(a + 1) : 2'(a);
      z_rd_start1 = 1'b1;
      z_rd_start2 = 1'b1;
      @(negedge clk);
      z_rd_start1 = 1'b0;
      z_rd_start2 = 1'b0;
      @(negedge clk);
      r1b[32*a +: 32]  = z_read1b;
      r1ub[32*a +: 32] = z_read1ub;
      r2[32*a +: 32]   = z_read2;
    end
    are = z_alarm_r;
    if (are[3:2] != 2'b00) mech[M_READ_MISMATCH]++;
    if (are != 4'b0000 && r1b == '0) mech[M_FULL_BLOCK]++;
    if (are != 4'b0000 && r1b != '0 && r1b != r1ub) mech[M_PARTIAL_BLOCK]++;
  endtask

  // test circuit: drive unit 0 = u, unit 1 = u with pair p inverted (p < 0: none)
  task automatic t_drive(input logic [2:0] u, input int p);
    logic [2:0] v;
    v = u;
    if (p >= 0) v[p] = !v[p];
    t_f0_r0 = u;
    t_f0_r1 = u;
    t_f1_r0 = v;
    t_f1_r1 = v;
    #1;
  endtask

  initial begin
    logic [127:0] ct, r1b, r1ub, r2;
    logic [3:0] arr, aur, are;
    foreach (mech[i]) mech[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---------------- encryption-engine monitor ----------------
    for (int t = 0; t < 3; t++) begin
      run_op(0, 0, ct, r1b, r1ub, r2, arr, aur, are);
      chk(are == 4'b0000 && r1b == ct && r2 == ct, "fault-free operation");
    end
    for (int fr = 0; fr < 10; fr += 3) begin
      run_op(1, fr, ct, r1b, r1ub, r2, arr, aur, are);
      chk(arr[1:0] == 2'b11 && aur[1:0] == 2'b11 && are == 4'b1111 && r1b == '0,
          $sformatf("divergence at round %0d: r=%b ur=%b end=%b", fr, arr, aur, are));
      if ({aur[1:0], arr[1:0]} == 4'hF) mech[M_CODE_F]++;
    end
    run_op(2, 4, ct, r1b, r1ub, r2, arr, aur, are);
    chk({aur[1:0], arr[1:0]} == 4'h3 && r1b == '0 && r1ub == ct, "one-round difference: code 3, blocked");
    if ({aur[1:0], arr[1:0]} == 4'h3) mech[M_CODE_3]++;
    run_op(3, 0, ct, r1b, r1ub, r2, arr, aur, are);
    chk(are == 4'b1100 && r1b[63:0] == ct[63:0] && r1b[127:64] == '0, "read address fault: partial block");

    // monitor upset in DEFCON2 rxor 3 (chain LUT 183 + 3), table bit 0:
    // false alarm whenever both read buses carry 0 on bit 3
    begin
      int f;
      f = (ZNL - 1 - (183 + 3)) * CFG_W + CFG_W - 1 - 5;
      rotate(0, f);
      @(negedge clk);
      z_start    = 1'b1;
      z_state1   = '0;
      z_state2   = '0;
      z_rd_start1 = 1'b1;
      z_rd_start2 = 1'b1;
      z_rd_addr1 = '0;
      z_rd_addr2 = '0;
      @(negedge clk);
      z_start     = 1'b0;
      z_rd_start1 = 1'b0;
      z_rd_start2 = 1'b0;
      @(negedge clk);
      chk(z_alarm_r == 4'b1100 && z_read1ub == z_read2, $sformatf("false alarm %b", z_alarm_r));
      if (z_alarm_r != 0 && z_read1ub == z_read2) mech[M_FALSE_ALARM]++;
      z_csw   = 1'b1;
      z_start = 1'b1;
      @(negedge clk);
      z_start = 1'b0;
      @(negedge clk);
      chk(z_alarm_r == 4'b0000, "correct_sw repairs");
      if (z_alarm_r == 4'b0000) mech[M_REPAIR]++;
      z_csw = 1'b0;
      rotate(0, f);
      run_op(0, 0, ct, r1b, r1ub, r2, arr, aur, are);
      chk(are == 4'b0000 && r1b == ct, "scrubbed");
      if (are == 4'b0000) mech[M_SCRUB]++;
    end

    // dual faults: random upset anywhere in the engine-monitor chain plus
    // an engine divergence; at least one registered alarm must be set
    for (int t = 0; t < 12; t++) begin
      int f;
      f = int'($urandom_range(ZL - 1));
      rotate(0, f);
      run_op(1, int'($urandom_range(9)), ct, r1b, r1ub, r2, arr, aur, are);
      chk(are != 4'b0000, $sformatf("dual fault, chain bit %0d, missed", f));
      if (are != 4'b0000) mech[M_DUAL_DETECT]++;
      rotate(0, f);
    end

    // ---------------- three-output test circuit ----------------
    for (int u = 0; u < 8; u++) begin
      t_drive(3'(u), -1);
      chk(t_alarm == 2'b00 && t_fs == 3'(u), "test circuit fault-free");
      chk(c_alarm == 2'b00 && c_fs == 3'(u), "logic block copy fault-free");
      for (int p = 0; p < 3; p++) begin
        t_drive(3'(u), p);
        chk(t_alarm == 2'b11, "test circuit detects");
        chk(t_fs == 3'b000, "test circuit blocks");
        if (t_alarm == 2'b11) mech[M_T_DETECT]++;
        if (t_fs == 3'b000) mech[M_T_BLOCK]++;
        chk(c_alarm == 2'b11 && c_fs == 3'b000, "logic block copy detects and blocks");
        if (c_alarm == 2'b11) mech[M_C_DETECT]++;
        if (c_fs == 3'b000) mech[M_C_BLOCK]++;
      end
    end
    // upset that routes the R-OR upper output (alarm1) through its flip-flop
    begin
      int f;
      f = (TNL - 1 - 5) * CFG_W + CFG_W - 1;   // regsel[0] of LUT 5 (ror)
      rotate(1, f);
      t_drive(3'b000, -1);
      @(negedge clk);
      t_drive(3'b000, 1);
      chk(t_alarm == 2'b10, $sformatf("alarm1 delayed, alarm2 immediate: %b", t_alarm));
      @(negedge clk);
      chk(t_alarm == 2'b11, "alarm1 one clock later");
      if (t_alarm == 2'b11) mech[M_REG_DELAY]++;
      t_drive(3'b000, -1);
      rotate(1, f);
    end
    for (int t = 0; t < 40; t++) begin
      int f;
      f = int'($urandom_range(TL - 1));
      rotate(1, f);
      t_drive(3'($urandom()), int'($urandom_range(2)));
      @(negedge clk);
      chk(t_alarm != 2'b00, "test circuit dual fault missed");
      if (t_alarm != 2'b00) mech[M_DUAL_DETECT]++;
      rotate(1, f);
    end
    // logic block copy: upsets that cut one routing connection of a used LUT
    for (int t = 0; t < 24; t++) begin
      int m, s, b, f;
      m = int'($urandom_range(8 * 6 - 1));
      s = int'(tc_route(m / 6, m % 6));
      b = ($urandom() % 2) ? 8 + s / 8 : s % 8;
      f = CL - 1 - (CLB + m * RMUX_W + b);
      rotate(2, f);
      t_drive(3'($urandom()), int'($urandom_range(2)));
      chk(c_alarm != 2'b00, $sformatf("logic block copy missed with MUX %0d bit %0d cut", m, b));
      if (c_alarm != 2'b00) mech[M_C_ROUTE_DETECT]++;
      rotate(2, f);
    end
    t_drive(3'b101, -1);
    chk(c_alarm == 2'b00 && c_fs == 3'b101, "logic block copy restored");

    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %s: %0d", mech_e'(m), mech[m]);
      chk(mech[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
