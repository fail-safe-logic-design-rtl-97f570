// clb_route_mux -- one 61-to-1 local routing MUX of the logic block, with
// its 16 configuration bits on the configuration chain.
//
// The MUX is a two-level pass-gate tree: idx[7:0] enables one of eight
// inputs inside every group of eight, grp[7:0] enables one of the groups,
// both one-hot. Source s is connected when grp[s / 8] and idx[s % 8] are
// both set (sources 61..63 do not exist). Source 0 is the constant 0;
// port bit src[k] carries source k (1..60). The configuration word is
// {grp, idx}; 60 MUXes x 16 bits give the 960 routing bits of a logic
// block.
//
// A configuration upset can leave no source connected or connect two. A
// two-state model must give both cases a value. This design's choice is
// that a floating output is pulled to 0, and that shorted sources resolve
// to 0 if any of them drives 0 (wired AND). Real silicon gives an
// intermediate, device-dependent voltage in the second case.
//
// While cfg_en is high or rst_n is low the output is held at 0. The fabric
// is isolated while the configuration shifts or is undefined after power-up,
// so that a half-shifted or random bitstream cannot close oscillating loops
// through the crossbar (design choice, standing in for the device's
// configuration-time output hold).
//
// y is combinational from src. Reset loads INIT (default: constant 0,
// source 0). Chain: ccff_head -> 16-bit shift register -> ccff_tail.
module clb_route_mux
  import defcon_pkg::*;
#(
  parameter logic [RMUX_W-1:0] INIT = 16'h0101
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cfg_en,
  input  logic                ccff_head,
  output logic                ccff_tail,
  input  logic [CLB_SRCS-1:1] src,
  output logic                y
);

  logic [RMUX_W-1:0] cfg_q;
  logic [63:0]       src_p;
  logic [63:0]       on;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cfg_q <= INIT;
    else if (cfg_en) cfg_q <= {cfg_q[RMUX_W-2:0], ccff_head};
  end
  assign ccff_tail = cfg_q[RMUX_W-1];

  assign src_p = 64'({src, 1'b0});

  always_comb begin
    for (int s = 0; s < 64; s++) on[s] = cfg_q[8 + s / 8] & cfg_q[s % 8] & (s < CLB_SRCS);
  end

  assign y = rst_n & !cfg_en & (|on) & (&(src_p | ~on));

endmodule
