// tb_clb_route_mux -- local routing MUX: selection, empty and multiple
// selections, configuration chain, reset value, output hold while
// configuring.
`timescale 1ns/1ps
module tb_clb_route_mux;
  import defcon_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0;
  logic head = 1'b0, tail, tail_b, y, y_b;
  logic [CLB_SRCS-1:0] src;  // src[0] models the constant and is kept 0
  int checks = 0, failures = 0;

  clb_route_mux dut (.clk, .rst_n, .cfg_en, .ccff_head(head), .ccff_tail(tail), .src(src[CLB_SRCS-1:1]), .y);
  clb_route_mux #(.INIT(16'h2020)) dut_b (.clk, .rst_n, .cfg_en, .ccff_head(1'b0),
                                          .ccff_tail(tail_b), .src(src[CLB_SRCS-1:1]), .y(y_b));

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

  // reference: pass gates on for grp[s/8] & idx[s%8]; none -> 0, several -> AND
  function automatic logic ref_y(input logic [15:0] c, input logic [CLB_SRCS-1:0] v);
    int n;
    logic r;
    n = 0;
    r = 1'b1;
    for (int g = 0; g < 8; g++)
      for (int i = 0; i < 8; i++)
        if (c[8+g] && c[i] && (8*g + i) < CLB_SRCS) begin
          n++;
          r &= v[8*g+i];
        end
    return (n > 0) ? r : 1'b0;
  endfunction

  task automatic load(input logic [15:0] c);
    for (int k = 15; k >= 0; k--) begin
      @(negedge clk);
      cfg_en = 1'b1;
      head   = c[k];
    end
    @(negedge clk);
    cfg_en = 1'b0;
    head   = 1'b0;
  endtask

  task automatic try(input logic [15:0] c, input int reps);
    load(c);
    for (int r = 0; r < reps; r++) begin
      src = {$urandom, $urandom} & ~61'd1;
      #1;
      chk(y == ref_y(c, src), $sformatf("cfg %h src %h y=%b", c, src, y));
    end
  endtask

  initial begin
    logic [15:0] c;
    src = '1;
    src[0] = 1'b0;
    #1;
    chk(y_b == 1'b0, "output held at 0 during reset");
    src = '0;
    #11;
    rst_n = 1'b1;
    // reset value: constant 0 for dut, source 45 for dut_b
    for (int r = 0; r < 50; r++) begin
      src = {$urandom, $urandom} & ~61'd1;
      #1;
      chk(y == 1'b0, "reset value selects constant 0");
      chk(y_b == src[45], "INIT selects source 45");
    end
    // every single source, with a walking one and walking zero
    for (int s = 0; s < CLB_SRCS; s++) begin
      load(rmux_cfg(s));
      for (int b = 0; b < CLB_SRCS; b++) begin
        src = '0;
        src[b] = (b != 0);
        #1;
        chk(y == (b == s && s != 0 ? 1'b1 : 1'b0), $sformatf("src %0d one at %0d", s, b));
        src = '1;
        src[0] = 1'b0;
        src[b] = 1'b0;
        #1;
        chk(y == (b == s || s == 0 ? 1'b0 : 1'b1), $sformatf("src %0d zero at %0d", s, b));
      end
    end
    // one-bit upsets of every single-source word, plus random words
    for (int s = 0; s < CLB_SRCS; s += 7)
      for (int b = 0; b < 16; b++) begin
        c = rmux_cfg(s);
        c[b] = !c[b];
        try(c, 20);
      end
    try(16'h0000, 20);
    try(16'hffff, 20);
    try(16'h8080, 20);
    for (int k = 0; k < 100; k++) try(16'($urandom), 10);
    // chain: a bit pattern re-appears at ccff_tail 16 cycles later
    begin
      logic [31:0] pat;
      pat = $urandom;
      for (int k = 31; k >= 0; k--) begin
        @(negedge clk);
        cfg_en = 1'b1;
        head   = pat[k];
        if (k <= 15) chk(tail == pat[k+16], $sformatf("chain delay bit %0d", k));
        chk(y == 1'b0, "output held at 0 while configuring");
      end
      @(negedge clk);
      cfg_en = 1'b0;
    end
    // async reset restores INIT
    load(16'hffff);
    rst_n = 1'b0;
    #1;
    rst_n = 1'b1;
    src = '1;
    src[0] = 1'b0;
    #1;
    chk(y == 1'b0, "reset restores constant 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
