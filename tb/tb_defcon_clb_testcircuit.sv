// tb_defcon_clb_testcircuit -- dual-fault campaign on the three-output
// monitor placed in a logic block, covering the LUT tables and the 960
// routing bits.
//
// Functional-unit side: the 32 assignments of the three duplicated bits
// A, B, C in which at most one pair disagrees (8 fault-free, 24 with exactly
// one unit fault); the two routed copies of a unit's bit always carry the
// same value. Monitor side: no upset, then each of the (6 + 2) * CFG_W
// configuration bits flipped in turn. Here that means every bit of the block:
// 10 LUTs and 60 routing MUXes. Each assignment is held for two clocks
// so that an upset that routes a LUT output through its flip-flop has its
// one-cycle delay.
//
// Checked: with no upset, alarms are exact and fs passes unit 1 or is all 0;
// with any single upset, every unit fault raises at least one alarm (no
// miss); a false alarm caused by an upset in the first table copy of an
// rxor goes away with correct_sw. Reported like the detection and blocking
// tables of the evaluation: false alarms, alarm1/alarm2 counts, misses,
// correctable upsets, outputs not blocked.
//
// Per-scenario rows like those of the published detection table are printed
// for four assignments: all bits 0 and fault-free, and a fault on A, B or C
// alone (unit 1 disagreeing, everything else 0).
//
// A routing upset that adds a LUT output as a second source of a MUX closes
// a combinational loop when that LUT lies on or after the MUX's LUT in the
// placed netlist. Such upsets are predicted from the placement, counted as
// loops and not injected, as a two-state simulation cannot give them a
// value.
`timescale 1ns/1ps
module tb_defcon_clb_testcircuit;
  import defcon_pkg::*;

  localparam int LB = CLB_LUTS * CFG_W;
  localparam int L  = LB + CLB_MUXES * RMUX_W;
  // netlist depth of LUTs 0..7; LUTs 8, 9 are unused (-1)
  localparam int LVL [CLB_LUTS] = '{0, 0, 0, 1, 1, 2, 3, 3, -1, -1};

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, flip = 1'b0;
  logic head, tail;
  logic [2:0] f0_r0, f1_r0, f0_r1, f1_r1;
  logic csw = 1'b0;
  logic [1:0] alarm;
  logic [2:0] fs;
  int checks = 0, failures = 0;
  int ff_alarm = 0, f_any = 0, f_al1 = 0, f_al2 = 0, missed = 0, correctable = 0;
  int not_blocked = 0, ff_wrong = 0;
  int loops = 0, lut_upsets = 0, route_upsets = 0, route_alarm = 0;
  // per-scenario rows: 0 fault-free, 1..3 fault on A, B, C (all other bits 0)
  int sc_any [4], sc_a1 [4], sc_a2 [4], sc_miss [4], sc_corr [4], sc_nb [4];
  string sc_name [4] = '{"fault-free", "fault A", "fault B", "fault C"};

  assign head = tail ^ flip;

  defcon_clb_testcircuit dut (.clk, .rst_n, .cfg_en, .ccff_head(head), .ccff_tail(tail),
                          .f0_r0, .f1_r0, .f0_r1, .f1_r1, .correct_sw(csw), .alarm, .fs);

  always #5 clk = ~clk;

  initial begin
    #200000000;
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

  task automatic rotate(input int f);
    for (int c = 0; c < L; c++) begin
      @(negedge clk);
      cfg_en = 1'b1;
      flip   = (c == f);
    end
    @(negedge clk);
    cfg_en = 1'b0;
    flip   = 1'b0;
  endtask

  // assignment s: bits [2:0] = values of A, B, C on unit 0; s >= 8 selects a
  // faulty pair p = (s - 8) / 8 and unit 1 disagrees on it
  task automatic apply(input int s, output bit faulty);
    logic [2:0] u0, u1;
    u0 = 3'(s % 8);
    u1 = u0;
    faulty = (s >= 8);
    if (faulty) u1[(s - 8) / 8] = !u0[(s - 8) / 8];
    f0_r0 = u0;
    f0_r1 = u0;
    f1_r0 = u1;
    f1_r1 = u1;
    @(negedge clk);
    @(negedge clk);
  endtask

  // source added by inverting bit b of MUX m, or -1 if none is added
  function automatic int added_src(input int m, input int b);
    logic [15:0] c;
    int s, g, i;
    s = int'(tc_route(m / 6, m % 6));
    c = rmux_cfg(s);
    if (c[b]) return -1;
    g = s / 8;
    i = s % 8;
    if (b < 8) i = b;
    else g = b - 8;
    return (8 * g + i < CLB_SRCS) ? 8 * g + i : -1;
  endfunction

  function automatic bit closes_loop(input int m, input int b);
    int s, u, t;
    s = added_src(m, b);
    if (s < int'(src_lut(0, 0))) return 1'b0;
    u = (s - int'(src_lut(0, 0))) / 2;
    t = m / 6;
    return LVL[u] >= 0 && LVL[t] >= 0 && (u == t || LVL[u] > LVL[t]);
  endfunction

  initial begin
    bit faulty;
    foreach (sc_any[r]) begin
      sc_any[r] = 0; sc_a1[r] = 0; sc_a2[r] = 0; sc_miss[r] = 0; sc_corr[r] = 0; sc_nb[r] = 0;
    end
    f0_r0 = '0; f1_r0 = '0; f0_r1 = '0; f1_r1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // no upset: exact behaviour, combinational alarm
    for (int s = 0; s < 32; s++) begin
      apply(s, faulty);
      chk(alarm == (faulty ? 2'b11 : 2'b00), $sformatf("no upset, s=%0d alarm=%b", s, alarm));
      chk(fs == (faulty ? 3'b000 : f1_r1), $sformatf("no upset, s=%0d fs=%b", s, fs));
    end
    // one upset at a time
    for (int f = 0; f < L; f++) begin
      int z, lut, pos, mux;
      bit raised;
      z   = L - 1 - f;
      lut = (z < LB) ? z / CFG_W : -1;
      pos = (z < LB) ? z % CFG_W : -1;
      mux = (z < LB) ? -1 : (z - LB) / RMUX_W;
      if (mux >= 0 && closes_loop(mux, (z - LB) % RMUX_W)) begin
        loops++;
        continue;
      end
      if (mux >= 0) route_upsets++; else lut_upsets++;
      raised = 1'b0;
      rotate(f);
      for (int s = 0; s < 32; s++) begin
        int row;
        row = (s % 8 == 0) ? s / 8 : -1;
        apply(s, faulty);
        if (row >= 0) begin
          if (alarm != 2'b00) sc_any[row]++; else if (faulty) sc_miss[row]++;
          if (alarm[0]) sc_a1[row]++;
          if (alarm[1]) sc_a2[row]++;
          if (faulty && fs != 3'b000) sc_nb[row]++;
          if (!faulty && alarm != 2'b00) begin
            csw = 1'b1;
            #1;
            if (alarm == 2'b00) sc_corr[row]++;
            csw = 1'b0;
            #1;
          end
        end
        if (faulty) begin
          chk(alarm != 2'b00, $sformatf("missed: lut %0d mux %0d chain bit %0d, s=%0d", lut, mux, z, s));
          if (alarm != 2'b00) f_any++; else missed++;
          if (alarm[0]) f_al1++;
          if (alarm[1]) f_al2++;
          if (fs != 3'b000) not_blocked++;
        end else begin
          if (fs != f1_r1 && alarm == 2'b00) ff_wrong++;
          if (alarm != 2'b00) begin
            ff_alarm++;
            raised = 1'b1;
            csw = 1'b1;
            #1;
            if (alarm == 2'b00) correctable++;
            // an rxor (luts 0..2) upset in table bits 0..15 / 32..47 is repairable
            if (lut < 3 && pos >= 5 && ((pos - 5) % 32) < 16)
              chk(alarm == 2'b00, $sformatf("rxor %0d bit %0d not repaired", lut, pos - 5));
            csw = 1'b0;
            #1;
          end
        end
      end
      if (mux >= 0 && raised) route_alarm++;
      rotate(f);
    end
    for (int s = 0; s < 32; s++) begin
      apply(s, faulty);
      chk(alarm == (faulty ? 2'b11 : 2'b00), $sformatf("restored, s=%0d", s));
    end
    $display("configuration bits %0d: LUT %0d, routing %0d, loops (not injected) %0d",
             L, lut_upsets, route_upsets, loops);
    $display("routing upsets that raise a false alarm: %0d", route_alarm);
    $display("scenario    | at least one alarm | alarm1 | alarm2 | missed | loops | correctable | not blocked");
    for (int r = 0; r < 4; r++)
      $display("%-11s | %18d | %6d | %6d | %6d | %5d | %11d | %11d",
               sc_name[r], sc_any[r], sc_a1[r], sc_a2[r], sc_miss[r], loops, sc_corr[r], sc_nb[r]);
    $display("fault-free assignments: false alarms %0d, correctable %0d, wrong output without alarm %0d",
             ff_alarm, correctable, ff_wrong);
    $display("faulty assignments: at least one alarm %0d, alarm1 %0d, alarm2 %0d, missed %0d, not blocked %0d",
             f_any, f_al1, f_al2, missed, not_blocked);
    chk(correctable > 0 && ff_alarm > 0, "false alarms and repairs occur");
    chk(loops > 0 && route_alarm > 0, "routing upsets are exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
