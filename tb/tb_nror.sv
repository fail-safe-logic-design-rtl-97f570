// tb_nror -- self-checking test of the six-input non-redundant OR LUT.
// All 64 input combinations are compared with the OR of the inputs, then
// every configuration bit is flipped in turn and the number of flips that
// change the function is counted: each of the 64 table bits must change
// exactly one input combination, and the test checks that the rotation
// restores the original table.
`timescale 1ns/1ps
module tb_nror;
  import defcon_pkg::*;

  localparam int L = CFG_W;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, flip = 1'b0;
  logic head, tail;
  logic [5:0] in = '0;
  logic y;
  int checks = 0, failures = 0;

  assign head = tail ^ flip;

  nror dut (.clk, .rst_n, .cfg_en, .ccff_head(head), .ccff_tail(tail), .in, .y);

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 64; v++) begin
      in = 6'(v);
      #1;
      chk(y == (v != 0), $sformatf("fault-free in=%0d", v));
    end
    for (int f = 0; f < 64; f++) begin
      int pos, diffs;
      pos = L - 1 - f;
      rotate(f);
      diffs = 0;
      for (int v = 0; v < 64; v++) begin
        in = 6'(v);
        #1;
        if (y != (v != 0)) diffs++;
      end
      chk(diffs == 1, $sformatf("table flip %0d changed %0d entries", pos, diffs));
      rotate(f);
    end
    for (int v = 0; v < 64; v++) begin
      in = 6'(v);
      #1;
      chk(y == (v != 0), $sformatf("restored in=%0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
