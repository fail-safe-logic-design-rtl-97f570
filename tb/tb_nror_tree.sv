// tb_nror_tree -- self-checking test of the NR-OR collector tree at its
// default width of 128 inputs.
// Checks y = |x for all-zero, every one-hot input and random inputs, and
// measures the configuration chain length, which must be 27 LUTs (22 + 4 + 1)
// times CFG_W bits: a marker bit is pushed in and the shifts until it reaches
// ccff_tail are counted.
`timescale 1ns/1ps
module tb_nror_tree;
  import defcon_pkg::*;

  localparam int W = 128;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, head = 1'b0;
  logic tail;
  logic [W-1:0] x = '0;
  logic y;
  int checks = 0, failures = 0;

  nror_tree #(.W(W)) dut (.clk, .rst_n, .cfg_en, .ccff_head(head), .ccff_tail(tail), .x, .y);

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

  initial begin
    int len;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    x = '0;
    #1;
    chk(y == 1'b0, "all zero");
    for (int i = 0; i < W; i++) begin
      x = '0;
      x[i] = 1'b1;
      #1;
      chk(y == 1'b1, $sformatf("one-hot %0d", i));
    end
    for (int t = 0; t < 200; t++) begin
      x = {$urandom(), $urandom(), $urandom(), $urandom()};
      if (t % 2 == 0) x &= {$urandom(), $urandom(), $urandom(), $urandom()} & {$urandom(), $urandom(), $urandom(), $urandom()};
      if (t % 4 == 0) x = '0;
      #1;
      chk(y == (|x), $sformatf("random %0d", t));
    end
    // chain length: fill with 0, then push one 1 and count
    for (int c = 0; c < 27 * CFG_W; c++) begin
      @(negedge clk);
      cfg_en = 1'b1;
      head   = 1'b0;
    end
    @(negedge clk);
    head = 1'b1;
    len  = 0;
    @(negedge clk);
    head = 1'b0;
    len  = 1;
    while (!tail && len < 100000) begin
      @(negedge clk);
      len++;
    end
    cfg_en = 1'b0;
    chk(len == nror_luts(W) * CFG_W && nror_luts(W) == 27,
        $sformatf("chain length %0d, expected %0d", len, 27 * CFG_W));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
