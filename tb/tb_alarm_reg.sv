// tb_alarm_reg -- self-checking test of the sticky alarm registers.
// Random alarm pulses and clears are applied for 2000 cycles; a reference
// model (set by any pulse, cleared by clr, one clock late) is compared each
// cycle. Also checks the one-cycle latency of a single pulse directly.
`timescale 1ns/1ps
module tb_alarm_reg;
  localparam int W = 4;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [W-1:0] alarm_ur = '0, alarm_r;
  logic [W-1:0] model = '0;
  int checks = 0, failures = 0;

  alarm_reg #(.W(W)) dut (.clk, .rst_n, .clr, .alarm_ur, .alarm_r);

  always #5 clk = ~clk;

  initial begin
    #1000000;
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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(alarm_r == '0, "reset value");
    // one pulse on bit 2
    alarm_ur = 4'b0100;
    #1;
    chk(alarm_r == '0, "not yet registered");
    @(negedge clk);
    alarm_ur = '0;
    chk(alarm_r == 4'b0100, "registered one cycle later");
    repeat (5) @(negedge clk);
    chk(alarm_r == 4'b0100, "sticky");
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    chk(alarm_r == '0, "cleared");
    model = '0;
    for (int c = 0; c < 2000; c++) begin
      alarm_ur = ($urandom_range(9) == 0) ? W'($urandom()) : '0;
      clr      = ($urandom_range(40) == 0);
      @(negedge clk);
      model = clr ? '0 : (model | alarm_ur);
      chk(alarm_r == model, $sformatf("cycle %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
