// nror_tree -- collector tree of non-redundant OR LUTs that reduces W
// mismatch signals to one.
//
// Each level packs its inputs into groups of six, one nror LUT per group
// (the last group padded with 0), and the level's outputs feed the next level
// until one signal is left. A 128-input tree uses 22 + 4 + 1 = 27 LUTs in
// three levels and a 32-input tree 6 + 1 = 7 in two, which with one tree for
// the j and one for the k signals gives the 54 and 14 NR-OR LUTs of the
// 128-bit and 32-bit monitors. The grouping order is this design's choice.
//
// All levels share one flat node array: the inputs first, then level 1, and
// so on, with the root last (tree_width / tree_offset in defcon_pkg give the
// layout). The output is combinational, one LUT delay per level. The
// configuration chain runs through the LUTs in node order. With W = 1 there
// is nothing to combine: the input is the output and the chain passes
// straight through.
module nror_tree
  import defcon_pkg::*;
#(
  parameter int unsigned W = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_en,
  input  logic         ccff_head,
  output logic         ccff_tail,
  input  logic [W-1:0] x,
  output logic         y
);

  localparam int unsigned NLVL  = tree_levels(W);
  localparam int unsigned NODES = tree_offset(W, NLVL + 1);
  localparam int unsigned NLUT  = NODES - W;

  logic [NODES-1:0] node;
  logic [NLUT:0]    chain;

  assign node[W-1:0] = x;
  assign chain[0]    = ccff_head;

  for (genvar l = 1; l <= NLVL; l++) begin : g_lvl
    localparam int unsigned WI = tree_width(W, l - 1);
    localparam int unsigned WO = tree_width(W, l);
    localparam int unsigned OI = tree_offset(W, l - 1);
    localparam int unsigned OO = tree_offset(W, l);
    for (genvar g = 0; g < WO; g++) begin : g_or
      logic [NROR_FANIN-1:0] grp;
      for (genvar b = 0; b < NROR_FANIN; b++) begin : g_in
        if (g * NROR_FANIN + b < WI) begin : g_used
          assign grp[b] = node[OI + g * NROR_FANIN + b];
        end else begin : g_pad
          assign grp[b] = 1'b0;
        end
      end
      nror u_or (
        .clk, .rst_n, .cfg_en,
        .ccff_head (chain[OO - W + g]),
        .ccff_tail (chain[OO - W + g + 1]),
        .in        (grp),
        .y         (node[OO + g])
      );
    end
  end

  assign y         = node[NODES-1];
  assign ccff_tail = chain[NLUT];

endmodule
