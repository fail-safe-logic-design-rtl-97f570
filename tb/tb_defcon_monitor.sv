// tb_defcon_monitor -- self-checking test of the DEFCON monitor at its
// default width of 128 bit pairs (183 LUTs).
//
//  * equal unit outputs: both alarms 0
//  * a unit fault on any single bit (both routes disagree): both alarms 1 in
//    the same cycle (combinational path)
//  * a fault on one route only: both alarms 1 (the root fans out)
//  * chain length = (128 + 54 + 1) * CFG_W
//  * dual faults: random configuration bits are flipped one at a time; with
//    each flip, random unit faults must still raise at least one alarm, and
//    after the repair rotation the monitor must be silent again
//  * an upset in the first table copy of an rxor gives a false alarm that
//    correct_sw removes
`timescale 1ns/1ps
module tb_defcon_monitor;
  import defcon_pkg::*;

  localparam int N  = 128;
  localparam int NL = 183;
  localparam int L  = NL * CFG_W;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, flip = 1'b0;
  logic head, tail;
  logic [N-1:0] f0_r0, f1_r0, f0_r1, f1_r1;
  logic csw = 1'b0;
  logic [1:0] alarm;
  int checks = 0, failures = 0;
  int dual_alarm = 0, one_alarm = 0;

  assign head = tail ^ flip;

  defcon_monitor #(.N(N)) dut (.clk, .rst_n, .cfg_en, .ccff_head(head), .ccff_tail(tail),
                               .f0_r0, .f1_r0, .f0_r1, .f1_r1, .correct_sw(csw), .alarm);

  always #5 clk = ~clk;

  initial begin
    #50000000;
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

  function automatic logic [N-1:0] rnd();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  // both units equal, then unit 1 wrong on bit b (b < 0: no fault)
  task automatic drive(input logic [N-1:0] v, input int b);
    f0_r0 = v;
    f0_r1 = v;
    f1_r0 = v;
    f1_r1 = v;
    if (b >= 0) begin
      f1_r0[b] = !v[b];
      f1_r1[b] = !v[b];
    end
    #1;
  endtask

  initial begin
    logic [N-1:0] v;
    int len;
    drive('0, -1);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(monitor_luts(N) == NL, "LUT count 183");
    for (int t = 0; t < 50; t++) begin
      drive(rnd(), -1);
      chk(alarm == 2'b00, $sformatf("fault-free %0d", t));
    end
    for (int b = 0; b < N; b++) begin
      drive(rnd(), b);
      chk(alarm == 2'b11, $sformatf("unit fault bit %0d alarm=%b", b, alarm));
    end
    for (int t = 0; t < 32; t++) begin
      int b;
      b = int'($urandom_range(N - 1));
      drive(rnd(), -1);
      if (t % 2 == 0) f1_r0[b] = !f1_r0[b];
      else            f0_r1[b] = !f0_r1[b];
      #1;
      chk(alarm == 2'b11, $sformatf("route fault bit %0d", b));
    end
    // a full rotation leaves the configuration unchanged
    drive('0, -1);
    rotate(-1);
    chk(alarm == 2'b00, "rotation keeps configuration");
    // chain length: clear the chain, push a single 1 and count shifts
    for (int c = 0; c < L; c++) begin
      @(negedge clk);
      cfg_en = 1'b1;
      flip   = 1'b0;
      force head = 1'b0;
    end
    @(negedge clk);
    force head = 1'b1;
    @(negedge clk);
    force head = 1'b0;
    len = 1;
    while (!tail && len < 2 * L) begin
      @(negedge clk);
      len++;
    end
    cfg_en = 1'b0;
    release head;
    chk(len == L, $sformatf("chain length %0d, expected %0d", len, L));
    // reprogram the fault-free configuration
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    // dual faults
    for (int t = 0; t < 30; t++) begin
      int f;
      f = (t < 4) ? ((NL - 1 - t) * CFG_W + CFG_W - 1 - 5) : int'($urandom_range(L - 1));
      rotate(f);
      for (int u = 0; u < 8; u++) begin
        drive(rnd(), int'($urandom_range(N - 1)));
        chk(alarm != 2'b00, $sformatf("dual fault flip %0d missed", f));
        if (alarm == 2'b11) dual_alarm++;
        else                one_alarm++;
      end
      if (t < 4) begin
        // rxor t, lut bit 0: false alarm for all-zero inputs, repaired by correct_sw
        drive('0, -1);
        chk(alarm == 2'b11, $sformatf("rxor %0d upset gives false alarm", t));
        csw = 1'b1;
        #1;
        chk(alarm == 2'b00, $sformatf("rxor %0d upset repaired by correct_sw", t));
        drive('0, 5);
        chk(alarm == 2'b11, "detection kept on redundant copy");
        csw = 1'b0;
      end
      rotate(f);
      drive(rnd(), -1);
      chk(alarm == 2'b00, $sformatf("flip %0d repaired", f));
    end
    $display("dual-fault detections: both alarms %0d, one alarm %0d", dual_alarm, one_alarm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
