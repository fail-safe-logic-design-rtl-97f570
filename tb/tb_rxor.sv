// tb_rxor -- self-checking test of the redundant XOR checker.
//
// 1. Fault-free: for all 32 input combinations j = a00 ^ a10, k = a01 ^ a11.
// 2. Every one of the 69 configuration bits is flipped in turn (chain
//    rotated once with that bit inverted, then once more to repair it). With
//    the flip in place, every functional-unit fault (a00 = a01 != a10 = a11)
//    must still raise j or k, and if the flip lies in the first table copy
//    (bits 0..15 or 32..47) raising correct_sw must give exact outputs again.
// 3. A stuck input on one pair with a unit fault present: the other cone
//    still flags the mismatch.
`timescale 1ns/1ps
module tb_rxor;
  import defcon_pkg::*;

  localparam int L = CFG_W;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, flip = 1'b0;
  logic head, tail;
  logic a00, a10, a01, a11, csw;
  logic j, k;
  int checks = 0, failures = 0;
  int detected = 0, repaired = 0;

  assign head = tail ^ flip;

  rxor dut (.clk, .rst_n, .cfg_en, .ccff_head(head), .ccff_tail(tail),
            .a00, .a10, .a01, .a11, .correct_sw(csw), .j, .k);

  always #5 clk = ~clk;

  initial begin
    #2000000;
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

  // rotate the chain once, inverting the bit that leaves the tail at step f
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

  task automatic apply(input logic [4:0] v);
    {csw, a11, a01, a10, a00} = v;
    #1;
  endtask

  initial begin
    apply('0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 32; v++) begin
      apply(5'(v));
      chk(j == (a00 ^ a10) && k == (a01 ^ a11), $sformatf("fault-free v=%0d", v));
    end
    for (int f = 0; f < L; f++) begin
      int pos, lutbit;
      pos    = L - 1 - f;          // position in the configuration word
      lutbit = pos - 5;            // truth-table bit, <0 for control bits
      rotate(f);
      for (int u = 0; u < 2; u++) begin
        // unit fault: unit 0 drives u, unit 1 drives !u on both routes
        apply({1'b0, 1'(!u), 1'(u), 1'(!u), 1'(u)});
        chk(j || k, $sformatf("flip %0d: unit fault u=%0d missed", pos, u));
        if (j || k) detected++;
      end
      if (lutbit >= 0 && (lutbit % 32) < 16) begin
        for (int v = 0; v < 16; v++) begin
          apply({1'b1, 4'(v)});
          chk(j == (a00 ^ a10) && k == (a01 ^ a11), $sformatf("flip %0d repair v=%0d", pos, v));
        end
        repaired++;
      end
      rotate(f);
      apply('0);
      chk(j == 1'b0 && k == 1'b0, $sformatf("flip %0d not restored", pos));
    end
    // stuck-at on one pair, unit fault present: a00 stuck at 1 while unit 0 is 0
    apply({1'b0, 1'b1, 1'b0, 1'b1, 1'b1});   // a00 forced 1, a10 = 1, a01 = 0, a11 = 1
    chk(k == 1'b1, "stuck a00 masks top cone, bottom cone must flag");
    chk(repaired == 32, $sformatf("repairable flips %0d", repaired));
    $display("unit faults detected under single configuration flips: %0d of %0d", detected, 2 * L);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
