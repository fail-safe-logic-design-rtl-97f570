// tb_readout_mux -- self-checking test of the 128-to-32-bit read-out.
// For random ciphertexts, the four chunks are read in random order; each
// read must return ct[32*a +: 32] one clock after start and hold it while
// start is low.
`timescale 1ns/1ps
module tb_readout_mux;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [1:0] addr = '0;
  logic [127:0] ct = '0;
  logic [31:0] rd;
  int checks = 0, failures = 0;

  readout_mux dut (.clk, .rst_n, .start, .addr, .ct, .rd);

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
    for (int t = 0; t < 100; t++) begin
      logic [31:0] held;
      ct = {$urandom(), $urandom(), $urandom(), $urandom()};
      for (int r = 0; r < 4; r++) begin
        addr  = 2'($urandom());
        start = 1'b1;
        #1;
        chk(t == 0 && r == 0 ? rd == '0 : 1'b1, "no change before the clock");
        @(negedge clk);
        start = 1'b0;
        chk(rd == ct[32*addr +: 32], $sformatf("read %0d/%0d addr %0d", t, r, addr));
        held = rd;
        addr = 2'($urandom());
        @(negedge clk);
        chk(rd == held, "holds without start");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
