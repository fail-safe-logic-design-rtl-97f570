// tb_openfpga_clb -- logic block: reset configuration, chain length, random
// acyclic netlists loaded through the chain against a reference model,
// sequential feedback through the crossbar, output hold while configuring.
`timescale 1ns/1ps
module tb_openfpga_clb;
  import defcon_pkg::*;

  localparam int L = CLB_LUTS * CFG_W + CLB_MUXES * RMUX_W;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, head = 1'b0, tail;
  logic [CLB_EXT-1:0]    ext;
  logic [2*CLB_LUTS-1:0] lo;
  int checks = 0, failures = 0;

  openfpga_clb dut (.clk, .rst_n, .cfg_en, .ccff_head(head), .ccff_tail(tail),
                    .ext_in(ext), .lut_out(lo));

  always #5 clk = ~clk;

  initial begin
    #20000000;
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

  lut6_cfg_t   lcfg [CLB_LUTS];
  int unsigned route [CLB_MUXES];

  // bitstream: MUX 59 .. 0, then LUT 9 .. 0; the first bit in ends at the tail
  task automatic load();
    logic [L-1:0] z;
    for (int l = 0; l < CLB_LUTS; l++) z[l*CFG_W +: CFG_W] = lcfg[l];
    for (int m = 0; m < CLB_MUXES; m++) z[CLB_LUTS*CFG_W + m*RMUX_W +: RMUX_W] = rmux_cfg(route[m]);
    for (int k = L - 1; k >= 0; k--) begin
      @(negedge clk);
      cfg_en = 1'b1;
      head   = z[k];
    end
    @(negedge clk);
    cfg_en = 1'b0;
    head   = 1'b0;
  endtask

  function automatic logic [2*CLB_LUTS-1:0] model(input logic [CLB_EXT-1:0] e);
    logic [2*CLB_LUTS-1:0] o;
    logic [CLB_SRCS-1:0]   v;
    o = '0;
    for (int l = 0; l < CLB_LUTS; l++) begin
      logic [5:0] in;
      logic u, w, l6;
      v = {o, e, 1'b0};
      for (int p = 0; p < 6; p++) in[p] = v[route[6*l+p]];
      u  = lcfg[l].lut[{1'b0, in[4:0]}];
      w  = lcfg[l].lut[{1'b1, in[4:0]}];
      l6 = (in[5] | lcfg[l].mode) ? u : w;
      o[2*l]   = (lcfg[l].sel3 == SEL_LUT6) ? l6 : (lcfg[l].sel3 == SEL_LUT5) ? u : 1'b0;
      o[2*l+1] = w;
    end
    return o;
  endfunction

  initial begin
    ext = '0;
    #12;
    rst_n = 1'b1;
    // reset configuration: all tables zero, every MUX on the constant
    for (int r = 0; r < 20; r++) begin
      ext = {$urandom, $urandom};
      #1;
      chk(lo == '0, "reset configuration drives 0");
    end
    // chain length: a marker appears at the tail after exactly L shifts
    begin
      int seen;
      seen = -1;
      for (int c = 0; c < L; c++) begin
        @(negedge clk);
        cfg_en = 1'b1;
        head   = 1'b0;
      end
      for (int c = 0; c < L + 5; c++) begin
        @(negedge clk);
        cfg_en = 1'b1;
        head   = (c == 0);
        #1;
        if (tail && seen < 0) seen = c;
      end
      @(negedge clk);
      cfg_en = 1'b0;
      head   = 1'b0;
      chk(seen == L, $sformatf("chain length %0d, expected %0d", seen, L));
    end
    // random acyclic netlists
    for (int t = 0; t < 24; t++) begin
      for (int l = 0; l < CLB_LUTS; l++) begin
        lcfg[l].lut    = {$urandom, $urandom};
        lcfg[l].mode   = 1'($urandom);
        lcfg[l].sel3   = 2'($urandom);
        lcfg[l].regsel = 2'b00;
        for (int p = 0; p < 6; p++) begin
          int unsigned kind;
          kind = $urandom % 4;
          if (kind == 0 || (kind == 3 && l == 0)) route[6*l+p] = (t % 2) ? src_ext($urandom % CLB_EXT) : 0;
          else if (kind == 3) route[6*l+p] = src_lut($urandom % l, $urandom % 2);
          else route[6*l+p] = src_ext($urandom % CLB_EXT);
        end
      end
      load();
      for (int r = 0; r < 60; r++) begin
        ext = {$urandom, $urandom};
        #1;
        chk(lo == model(ext), $sformatf("netlist %0d: lut_out %h expected %h", t, lo, model(ext)));
      end
      // while configuring, every LUT sees all-zero inputs
      @(negedge clk);
      cfg_en = 1'b1;
      #1;
      ext = '1;
      #1;
      for (int l = 0; l < CLB_LUTS; l++) begin
        logic e0;
        e0 = (lcfg[l].sel3 == SEL_LUT6) ? (lcfg[l].mode ? lcfg[l].lut[0] : lcfg[l].lut[32])
           : (lcfg[l].sel3 == SEL_LUT5) ? lcfg[l].lut[0] : 1'b0;
        chk(lo[2*l +: 2] == {lcfg[l].lut[32], e0}, $sformatf("LUT %0d inputs held at 0 while configuring", l));
      end
      cfg_en = 1'b0;
      #1;
    end
    // sequential feedback: LUT 0 is a registered inverter of its own output
    for (int l = 0; l < CLB_LUTS; l++) begin
      lcfg[l] = '0;
      for (int p = 0; p < 6; p++) route[6*l+p] = 0;
    end
    lcfg[0].lut    = 64'h5555_5555_5555_5555;
    lcfg[0].sel3   = SEL_LUT5;
    lcfg[0].regsel = 2'b01;
    route[0] = src_lut(0, 0);
    lcfg[1].lut  = 64'hAAAA_AAAA_AAAA_AAAA;
    lcfg[1].sel3 = SEL_LUT5;
    route[6] = src_lut(0, 0);
    load();
    begin
      logic prev;
      @(negedge clk);
      prev = lo[0];
      for (int c = 0; c < 20; c++) begin
        @(negedge clk);
        chk(lo[0] == !prev, $sformatf("toggle cycle %0d", c));
        chk(lo[2] == lo[0], "LUT 1 follows LUT 0 through the crossbar");
        prev = lo[0];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
