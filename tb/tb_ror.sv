// tb_ror -- self-checking test of the redundant OR collector.
//
// Fault-free, all 32 input combinations: alarm1 = a0 | b0, alarm2 = a1 | b1.
// Then each of the 69 configuration bits is flipped in turn: with a mismatch
// present on either tree root (fanned out to both cones, as in the monitor)
// at least one alarm must be raised, and a flip in the first table copy must
// be repaired exactly by correct_sw.
`timescale 1ns/1ps
module tb_ror;
  import defcon_pkg::*;

  localparam int L = CFG_W;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, flip = 1'b0;
  logic head, tail;
  logic a0, b0, a1, b1, csw;
  logic al1, al2;
  int checks = 0, failures = 0, repaired = 0;

  assign head = tail ^ flip;

  ror dut (.clk, .rst_n, .cfg_en, .ccff_head(head), .ccff_tail(tail),
           .a0, .b0, .a1, .b1, .correct_sw(csw), .alarm1(al1), .alarm2(al2));

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
    {csw, b1, a1, b0, a0} = v;
    #1;
  endtask

  initial begin
    apply('0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 32; v++) begin
      apply(5'(v));
      chk(al1 == (a0 | b0) && al2 == (a1 | b1), $sformatf("fault-free v=%0d", v));
    end
    for (int f = 0; f < L; f++) begin
      int pos, lutbit;
      pos    = L - 1 - f;
      lutbit = pos - 5;
      rotate(f);
      for (int r = 1; r < 4; r++) begin
        // r = {k root, j root}, same values on both cones
        apply({1'b0, 1'(r >> 1), 1'(r), 1'(r >> 1), 1'(r)});
        chk(al1 || al2, $sformatf("flip %0d roots=%0d missed", pos, r));
      end
      if (lutbit >= 0 && (lutbit % 32) < 16) begin
        for (int v = 0; v < 16; v++) begin
          apply({1'b1, 4'(v)});
          chk(al1 == (a0 | b0) && al2 == (a1 | b1), $sformatf("flip %0d repair v=%0d", pos, v));
        end
        repaired++;
      end
      rotate(f);
      apply('0);
      chk(!al1 && !al2, $sformatf("flip %0d not restored", pos));
    end
    chk(repaired == 32, "repairable flips");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
