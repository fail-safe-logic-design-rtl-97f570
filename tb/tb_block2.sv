// tb_block2 -- self-checking test of the two-output blocking LUT.
// All 32 input combinations: a_fs = a and b_fs = b while both alarms are 0,
// both 0 otherwise, for either value of correct_sw. Then a flip in the
// first table copy is shown to be repaired by correct_sw.
`timescale 1ns/1ps
module tb_block2;
  import defcon_pkg::*;

  localparam int L = CFG_W;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, flip = 1'b0;
  logic head, tail;
  logic a, b, al1, al2, csw;
  logic a_fs, b_fs;
  int checks = 0, failures = 0;

  assign head = tail ^ flip;

  block2 dut (.clk, .rst_n, .cfg_en, .ccff_head(head), .ccff_tail(tail),
              .a, .b, .alarm1(al1), .alarm2(al2), .correct_sw(csw), .a_fs, .b_fs);

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

  task automatic check_all(input bit use_csw, input string tag);
    for (int v = 0; v < 16; v++) begin
      {al2, al1, b, a} = 4'(v);
      csw = use_csw;
      #1;
      chk(a_fs == (a & !al1 & !al2) && b_fs == (b & !al1 & !al2), $sformatf("%s v=%0d", tag, v));
    end
  endtask

  initial begin
    {a, b, al1, al2, csw} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_all(1'b0, "copy 0");
    check_all(1'b1, "copy 1");
    // flip truth-table bit 3 (upper cone, a = b = 1, no alarm): upper copy
    // now outputs 0 for that case; correct_sw restores the function
    rotate(CFG_W - 1 - (5 + 3));
    {al2, al1, b, a} = 4'b0011;
    csw = 1'b0;
    #1;
    chk(a_fs == 1'b0, "flipped bit takes effect");
    check_all(1'b1, "repaired");
    rotate(CFG_W - 1 - (5 + 3));
    check_all(1'b0, "restored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
