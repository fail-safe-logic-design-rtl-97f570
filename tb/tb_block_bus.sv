// tb_block_bus -- self-checking test of the 32-bit blocking circuit.
// q must equal d while all four registered alarms are 0 and be all zeros
// for every non-zero alarm pattern. An upset in one NOR LUT that sticks its
// enable at 1 must not unblock the bus (the second enable still blocks), and
// correct_sw with the redundant copy repairs it.
`timescale 1ns/1ps
module tb_block_bus;
  import defcon_pkg::*;

  localparam int W = 32;
  localparam int L = (W + 2) * CFG_W;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, flip = 1'b0;
  logic head, tail;
  logic [3:0] alarm_r = '0;
  logic csw = 1'b0;
  logic [W-1:0] d = '0, q;
  int checks = 0, failures = 0;

  assign head = tail ^ flip;

  block_bus #(.W(W)) dut (.clk, .rst_n, .cfg_en, .ccff_head(head), .ccff_tail(tail),
                          .alarm_r, .correct_sw(csw), .d, .q);

  always #5 clk = ~clk;

  initial begin
    #5000000;
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

  task automatic sweep(input string tag);
    for (int a = 0; a < 16; a++) begin
      for (int t = 0; t < 4; t++) begin
        alarm_r = 4'(a);
        d = $urandom();
        #1;
        chk(q == ((a == 0) ? d : '0), $sformatf("%s alarms=%b", tag, alarm_r));
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    sweep("fault-free");
    csw = 1'b1;
    sweep("redundant copy");
    csw = 1'b0;
    // NOR LUT 0 (first in the chain, furthest from the tail), table bit 1
    // (alarm 0 only): its enable wrongly stays 1 for that alarm
    begin
      int f;
      f = (W + 1) * CFG_W + CFG_W - 1 - 5 - 1;
      rotate(f);
      sweep("one NOR upset");
      csw = 1'b1;
      sweep("NOR upset, copy 1");
      csw = 1'b0;
      rotate(f);
    end
    sweep("restored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
