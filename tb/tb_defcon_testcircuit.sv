// tb_defcon_testcircuit -- dual-fault campaign on the three-output monitor.
//
// Functional-unit side: the 32 assignments of the three duplicated bits
// A, B, C in which at most one pair disagrees (8 fault-free, 24 with exactly
// one unit fault); the two routed copies of a unit's bit always carry the
// same value. Monitor side: no upset, then each of the (6 + 2) * CFG_W
// configuration bits flipped in turn. Each assignment is held for two clocks
// so that an upset that routes a LUT output through its flip-flop has its
// one-cycle delay.
//
// Checked: with no upset, alarms are exact and fs passes unit 1 or is all 0;
// with any single upset, every unit fault raises at least one alarm (no
// miss); a false alarm caused by an upset in the first table copy of an
// rxor goes away with correct_sw. Reported like the detection and blocking
// tables of the evaluation: false alarms, alarm1/alarm2 counts, misses,
// correctable upsets, outputs not blocked.
`timescale 1ns/1ps
module tb_defcon_testcircuit;
  import defcon_pkg::*;

  localparam int NL = 8;
  localparam int L  = NL * CFG_W;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, flip = 1'b0;
  logic head, tail;
  logic [2:0] f0_r0, f1_r0, f0_r1, f1_r1;
  logic csw = 1'b0;
  logic [1:0] alarm;
  logic [2:0] fs;
  int checks = 0, failures = 0;
  int ff_alarm = 0, f_any = 0, f_al1 = 0, f_al2 = 0, missed = 0, correctable = 0;
  int not_blocked = 0, ff_wrong = 0;

  assign head = tail ^ flip;

  defcon_testcircuit dut (.clk, .rst_n, .cfg_en, .ccff_head(head), .ccff_tail(tail),
                          .f0_r0, .f1_r0, .f0_r1, .f1_r1, .correct_sw(csw), .alarm, .fs);

  always #5 clk = ~clk;

  initial begin
    #20000000;
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

  initial begin
    bit faulty;
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
      int lut, pos;
      lut = NL - 1 - f / CFG_W;
      pos = CFG_W - 1 - f % CFG_W;
      rotate(f);
      for (int s = 0; s < 32; s++) begin
        apply(s, faulty);
        if (faulty) begin
          chk(alarm != 2'b00, $sformatf("missed: lut %0d cfg bit %0d, s=%0d", lut, pos, s));
          if (alarm != 2'b00) f_any++; else missed++;
          if (alarm[0]) f_al1++;
          if (alarm[1]) f_al2++;
          if (fs != 3'b000) not_blocked++;
        end else begin
          if (fs != f1_r1 && alarm == 2'b00) ff_wrong++;
          if (alarm != 2'b00) begin
            ff_alarm++;
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
      rotate(f);
    end
    for (int s = 0; s < 32; s++) begin
      apply(s, faulty);
      chk(alarm == (faulty ? 2'b11 : 2'b00), $sformatf("restored, s=%0d", s));
    end
    $display("upsets %0d x assignments 32", L);
    $display("fault-free assignments: false alarms %0d, correctable %0d, wrong output without alarm %0d",
             ff_alarm, correctable, ff_wrong);
    $display("faulty assignments: at least one alarm %0d, alarm1 %0d, alarm2 %0d, missed %0d, not blocked %0d",
             f_any, f_al1, f_al2, missed, not_blocked);
    chk(correctable > 0 && ff_alarm > 0, "false alarms and repairs occur");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
