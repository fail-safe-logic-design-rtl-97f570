// openfpga_clb -- configurable logic block: ten fracturable LUTs joined by
// a fully connected local crossbar.
//
// Each of the 60 LUT inputs is driven by its own clb_route_mux, which can
// pick any of the 20 LUT outputs, any of the 40 external inputs or a
// constant 0 (61 sources). MUX m drives input m % 6 of LUT m / 6. All 20
// LUT outputs leave the block on lut_out (output o of LUT l is bit
// 2*l + o). Every LUT output reaches exactly the inputs its MUXes select,
// so the block has no internal fan-out other than what the configuration
// asks for.
//
// Configuration: LUT_INIT (LUT l at [l*CFG_W +: CFG_W]) and MUX_INIT (MUX m
// at [m*16 +: 16]) are loaded at reset. The chain runs through LUT 0 .. 9,
// then MUX 0 .. 59: 10 * CFG_W + 960 bits.
//
// Combinational paths run from LUT outputs back through the crossbar to LUT
// inputs. Lint and synthesis therefore see a combinational loop
// (lut_out -> clb_route_mux -> frac_lut6 -> lut_out). It stands because it
// is the nature of a programmable crossbar: a valid configuration, such as
// an acyclic mapped netlist, never closes the loop. A configuration upset
// can close it, as in the real device.
module openfpga_clb
  import defcon_pkg::*;
#(
  parameter clb_lut_init_t LUT_INIT = '0,
  parameter clb_mux_init_t MUX_INIT = {CLB_MUXES{16'h0101}}
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_en,
  input  logic                  ccff_head,
  output logic                  ccff_tail,
  input  logic [CLB_EXT-1:0]    ext_in,
  output logic [2*CLB_LUTS-1:0] lut_out
);

  logic [CLB_SRCS-1:1]          src;
  logic [CLB_MUXES-1:0]         mux_y;
  logic [CLB_LUTS+CLB_MUXES:0]  chain;

  assign src      = {lut_out, ext_in};
  assign chain[0] = ccff_head;

  for (genvar l = 0; l < CLB_LUTS; l++) begin : g_lut
    frac_lut6 #(.INIT(LUT_INIT[l*CFG_W +: CFG_W])) u_lut (
      .clk, .rst_n, .cfg_en,
      .ccff_head (chain[l]),
      .ccff_tail (chain[l+1]),
      .in        (mux_y[6*l +: 6]),
      .out       (lut_out[2*l +: 2])
    );
  end

  for (genvar m = 0; m < CLB_MUXES; m++) begin : g_mux
    clb_route_mux #(.INIT(MUX_INIT[m*RMUX_W +: RMUX_W])) u_mux (
      .clk, .rst_n, .cfg_en,
      .ccff_head (chain[CLB_LUTS + m]),
      .ccff_tail (chain[CLB_LUTS + m + 1]),
      .src       (src),
      .y         (mux_y[m])
    );
  end

  assign ccff_tail = chain[CLB_LUTS + CLB_MUXES];

endmodule
