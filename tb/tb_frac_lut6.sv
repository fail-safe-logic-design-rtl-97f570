// tb_frac_lut6 -- self-checking test of the fracturable LUT6.
//
// Loads random configuration words through the chain and, for each, applies
// all 64 input combinations, comparing out[0]/out[1] with a reference built
// from the documented addressing (upper cone = bit in[4:0], lower cone =
// bit 32 + in[4:0], lut6 = (in[5] | mode) ? upper : lower, 3-to-1 MUX,
// optional output flip-flop with one cycle of latency). Also checks the reset
// value and that the chain shifts the old word out of ccff_tail MSB first.
`timescale 1ns/1ps
module tb_frac_lut6;
  import defcon_pkg::*;

  localparam lut6_cfg_t INIT = '{lut: 64'h0123_4567_89AB_CDEF, mode: 1'b1, sel3: 2'b01, regsel: 2'b00};

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, head = 1'b0;
  logic tail;
  logic [5:0] in = '0;
  logic [1:0] out;
  int checks = 0, failures = 0;

  frac_lut6 #(.INIT(INIT)) dut (.clk, .rst_n, .cfg_en, .ccff_head(head), .ccff_tail(tail), .in, .out);

  always #5 clk = ~clk;

  initial begin
    #200000;
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

  function automatic logic [1:0] ref_out(input lut6_cfg_t c, input logic [5:0] x);
    logic up, lo, l6, m;
    up = c.lut[x[4:0]];
    lo = c.lut[32 + int'(x[4:0])];
    l6 = (x[5] || c.mode) ? up : lo;
    case (c.sel3)
      2'b00:   m = l6;
      2'b01:   m = up;
      default: m = 1'b0;
    endcase
    return {lo, m};
  endfunction

  // shift a new word in (MSB first) and check the old one comes out
  task automatic load(input lut6_cfg_t nw, input lut6_cfg_t old);
    logic [CFG_W-1:0] w, o;
    w = CFG_W'(nw);
    o = CFG_W'(old);
    for (int i = CFG_W - 1; i >= 0; i--) begin
      @(negedge clk);
      chk(tail == o[i], $sformatf("tail bit %0d", i));
      cfg_en = 1'b1;
      head   = w[i];
    end
    @(negedge clk);
    cfg_en = 1'b0;
  endtask

  initial begin
    lut6_cfg_t cur, nxt;
    logic [1:0] exp_o, prev_exp;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cur = INIT;
    // reset value: upper cone of the INIT table, combinational
    for (int x = 0; x < 64; x++) begin
      in = 6'(x);
      #1;
      chk(out == ref_out(cur, in), $sformatf("init in=%0d", x));
    end
    for (int t = 0; t < 40; t++) begin
      nxt.lut    = {$urandom(), $urandom()};
      nxt.mode   = 1'($urandom());
      nxt.sel3   = 2'($urandom());
      nxt.regsel = (t < 30) ? 2'b00 : 2'($urandom());
      load(nxt, cur);
      cur = nxt;
      prev_exp = 'x;
      for (int x = 0; x < 64; x++) begin
        @(negedge clk);
        in = 6'(x);
        #1;
        exp_o = ref_out(cur, in);
        for (int b = 0; b < 2; b++) begin
          if (!cur.regsel[b])
            chk(out[b] == exp_o[b], $sformatf("cfg %0d in=%0d out[%0d]", t, x, b));
          else if (x > 0)
            chk(out[b] == prev_exp[b], $sformatf("cfg %0d in=%0d registered out[%0d]", t, x, b));
        end
        prev_exp = exp_o;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
