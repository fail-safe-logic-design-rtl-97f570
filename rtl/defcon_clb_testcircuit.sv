// defcon_clb_testcircuit -- the three-output DEFCON test circuit placed in
// one configurable logic block, so that upsets of the routing
// configuration can be studied as well as upsets of the LUT tables.
//
// The logic is that of defcon_testcircuit: three rxor, two NR-OR, one R-OR
// and two blocking LUTs. Here they are LUTs 0..7 of an openfpga_clb, and
// the crossbar is programmed to connect them (LUTs 8 and 9 are unused). The
// placement and the assignment of external inputs are given by tc_route,
// tc_lut_init and tc_mux_init in defcon_pkg and are this design's choice.
// External input 13 is tied to 1 for the LUTs' in[5]; unused external
// inputs are tied to 0. Each monitored bit arrives on four external inputs,
// so the two wire pairs are separate all the way to the LUT.
//
// Outputs: alarm = {R-OR lower, R-OR upper}, fs = {C, B, A} from the
// blocking LUTs; all combinational. Chain: 10 * CFG_W + 960 = 1650 bits.
module defcon_clb_testcircuit
  import defcon_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_en,
  input  logic       ccff_head,
  output logic       ccff_tail,
  input  logic [2:0] f0_r0,
  input  logic [2:0] f1_r0,
  input  logic [2:0] f0_r1,
  input  logic [2:0] f1_r1,
  input  logic       correct_sw,
  output logic [1:0] alarm,
  output logic [2:0] fs
);

  logic [CLB_EXT-1:0]    ext;
  logic [2*CLB_LUTS-1:0] lo;

  assign ext = CLB_EXT'({1'b1, correct_sw, f1_r1, f0_r1, f1_r0, f0_r0});

  openfpga_clb #(
    .LUT_INIT (tc_lut_init()),
    .MUX_INIT (tc_mux_init())
  ) u_clb (
    .clk, .rst_n, .cfg_en, .ccff_head, .ccff_tail,
    .ext_in  (ext),
    .lut_out (lo)
  );

  assign alarm = {lo[2*5+1], lo[2*5]};
  assign fs    = {lo[2*7], lo[2*6+1], lo[2*6]};

endmodule
