// block_bus -- blocking circuit for a W-bit read-out bus.
//
// Two NOR LUTs each compute the block enable, 1 while all four registered
// alarms are 0; the enable is built twice so that one faulty LUT cannot keep
// the bus open on its own. W AND LUTs, one per bus bit, pass d[i] to q[i]
// only while both enable copies are 1, so any registered alarm forces the
// whole bus to the fail-safe value 0.
//
// All gates are frac_lut6 LUTs with correct_sw on in[4] and the same table
// in both in[4] halves. Inputs of an AND LUT: in[0] data, in[1] and in[2]
// the two enables; these placements are this design's choice. q is
// combinational from d and alarm_r. Configuration chain: NOR 0, NOR 1, then
// AND 0 .. W-1; (W + 2) * CFG_W bits.
module block_bus
  import defcon_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_en,
  input  logic         ccff_head,
  output logic         ccff_tail,
  input  logic [3:0]   alarm_r,
  input  logic         correct_sw,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W+2:0] chain;
  logic [1:0]   en;
  logic [1:0]   nor_out [2];
  logic [1:0]   and_out [W];

  assign chain[0] = ccff_head;

  for (genvar n = 0; n < 2; n++) begin : g_nor
    frac_lut6 #(.INIT(gate_cfg(G_BNOR))) u_nor (
      .clk, .rst_n, .cfg_en,
      .ccff_head (chain[n]),
      .ccff_tail (chain[n+1]),
      .in        ({1'b1, correct_sw, alarm_r}),
      .out       (nor_out[n])
    );
    assign en[n] = nor_out[n][0];
  end

  for (genvar i = 0; i < W; i++) begin : g_and
    frac_lut6 #(.INIT(gate_cfg(G_BAND))) u_and (
      .clk, .rst_n, .cfg_en,
      .ccff_head (chain[i+2]),
      .ccff_tail (chain[i+3]),
      .in        ({1'b1, correct_sw, 1'b0, en[1], en[0], d[i]}),
      .out       (and_out[i])
    );
    assign q[i] = and_out[i][0];
  end

  assign ccff_tail = chain[W+2];

endmodule
