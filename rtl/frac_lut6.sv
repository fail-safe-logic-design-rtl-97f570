// frac_lut6 -- fracturable 6-input look-up table with its own configuration
// memory, the building block of every DEFCON gate.
//
// The 64 truth-table bits are split into two independent cones. The upper
// cone reads bit in[4:0] and drives lut5[0]; the lower cone reads bit
// 32 + in[4:0] and drives lut5[1]. The two cones share only the input wires,
// which is what lets one LUT hold two fault-independent checkers. A lut6
// function is formed by choosing between the cones with (in[5] | mode). out[0]
// comes from a 3-to-1 MUX (lut6, lut5[0] or constant 0) and each output can
// be routed through a flip-flop; out[1] is lut5[1]. This follows the
// OpenFPGA LUT6 the monitor was designed on.
//
// Configuration memory: a CFG_W-bit shift register on a configuration chain
// (ccff_head in, ccff_tail out, one bit per cycle while cfg_en is high, most
// significant field first out). Reset loads INIT, the fault-free bitstream of
// the gate; shifting the chain round with one bit inverted injects a
// configuration-memory upset, shifting it round again repairs it. Reset and
// the shift register stand in for the device's programming logic and are this
// design's choice.
//
// Timing: out[] is combinational from in[] unless regsel routes it through
// the output flip-flop (one cycle later).
//
// Inside openfpga_clb, lint reports the cones and the 3-to-1 MUX as circular
// logic. The loop runs through the block's routing crossbar, and its opening
// comment explains why it stands.
module frac_lut6
  import defcon_pkg::*;
#(
  parameter lut6_cfg_t INIT = '0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_en,
  input  logic       ccff_head,
  output logic       ccff_tail,
  input  logic [5:0] in,
  output logic [1:0] out
);

  logic [CFG_W-1:0] cfg_q;
  lut6_cfg_t        cfg;
  logic [1:0]       lut5;
  logic             lut6;
  logic             mux3;
  logic [1:0]       out_ff;

  assign cfg = lut6_cfg_t'(cfg_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cfg_q <= CFG_W'(INIT);
    else if (cfg_en) cfg_q <= {cfg_q[CFG_W-2:0], ccff_head};
  end
  assign ccff_tail = cfg_q[CFG_W-1];

  // two independent cones
  assign lut5[0] = cfg.lut[{1'b0, in[4:0]}];
  assign lut5[1] = cfg.lut[{1'b1, in[4:0]}];
  assign lut6    = (in[5] | cfg.mode) ? lut5[0] : lut5[1];

  always_comb begin
    unique case (cfg.sel3)
      SEL_LUT6: mux3 = lut6;
      SEL_LUT5: mux3 = lut5[0];
      SEL_ZERO: mux3 = 1'b0;
      default:  mux3 = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_ff <= '0;
    else        out_ff <= {lut5[1], mux3};
  end

  assign out[0] = cfg.regsel[0] ? out_ff[0] : mux3;
  assign out[1] = cfg.regsel[1] ? out_ff[1] : lut5[1];

endmodule
