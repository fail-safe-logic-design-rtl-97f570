// defcon_pkg -- configuration format and truth tables shared by the DEFCON
// fail-safe monitor.
//
// Every gate of the monitor is one fracturable 6-input LUT (frac_lut6). A LUT
// is described by a packed configuration word of CFG_W bits:
//   lut    [63:0]  truth table; bits 0..31 form the upper cone (lut5[0]) and
//                  bits 32..63 the lower cone (lut5[1]), each addressed by
//                  in[4:0]; in[4] picks the second 16-bit copy of a cone
//   mode           ORed with in[5]; 1 makes the lut6 path take the upper cone
//   sel3   [1:0]   3-to-1 MUX on out[0]: 00 lut6, 01 lut5[0], 10/11 constant 0
//   regsel [1:0]   1 sends out[i] through its flip-flop, 0 bypasses it
// The layout of the bits follows the described behaviour of the LUT; the
// order of the fields in the chain is this design's choice.
//
// The functions below build the fault-free DEFCON truth tables. Each
// "dual" table holds a 4-input upper function and a 4-input lower function,
// and writes each one twice (in[4] = 0 and in[4] = 1) so that the correct_sw
// input on in[4] can switch a gate to its untouched redundant copy. For the
// R-XOR gate the upper function depends only on in[1:0] and the lower only on
// in[3:2]: a fault on one input pair cannot disturb the other cone.
package defcon_pkg;

  localparam int unsigned LUT_BITS = 64;

  typedef struct packed {
    logic [LUT_BITS-1:0] lut;
    logic                mode;
    logic [1:0]          sel3;
    logic [1:0]          regsel;
  } lut6_cfg_t;

  localparam int unsigned CFG_W = $bits(lut6_cfg_t);

  // 3-to-1 output MUX select codes
  localparam logic [1:0] SEL_LUT6  = 2'b00;
  localparam logic [1:0] SEL_LUT5  = 2'b01;
  localparam logic [1:0] SEL_ZERO  = 2'b10;

  // Fan-in of one non-redundant OR LUT (all six LUT inputs)
  localparam int unsigned NROR_FANIN = 6;

  // Gate kinds that have a fault-free table
  typedef enum logic [2:0] {
    G_RXOR, G_NROR, G_ROR, G_BLOCK2, G_BNOR, G_BAND
  } gate_e;

  // Replicate a 16-entry upper and lower function over both in[4] halves.
  function automatic logic [63:0] dual_table(input logic [15:0] up, input logic [15:0] lo);
    return {lo, lo, up, up};
  endfunction

  // 16-entry table of a function of in[3:0], one bit per input combination.
  function automatic logic [15:0] tab16(input gate_e g, input bit lower);
    logic [15:0] t;
    for (int i = 0; i < 16; i++) begin
      logic [3:0] x;
      x = 4'(i);
      unique case (g)
        G_RXOR:   t[i] = lower ? (x[2] ^ x[3]) : (x[0] ^ x[1]);
        G_ROR:    t[i] = lower ? (x[2] | x[3]) : (x[0] | x[1]);
        // in0 = A, in1 = B, in2/in3 = alarms; upper passes A, lower passes B
        G_BLOCK2: t[i] = (lower ? x[1] : x[0]) & ~x[2] & ~x[3];
        // NOR of the four registered alarms, same in both cones
        G_BNOR:   t[i] = ~|x;
        // in0 = data, in1/in2 = the two block-enable copies
        G_BAND:   t[i] = x[0] & x[1] & x[2];
        default:  t[i] = 1'b0;
      endcase
    end
    return t;
  endfunction

  // Fault-free configuration word of a gate kind.
  function automatic lut6_cfg_t gate_cfg(input gate_e g);
    lut6_cfg_t c;
    c.regsel = 2'b00;
    if (g == G_NROR) begin
      // full 6-input OR: lut6 = in5 ? upper : lower, zero only for all-zero inputs
      c.lut        = '1;
      c.lut[32]    = 1'b0;
      c.mode       = 1'b0;
      c.sel3       = SEL_LUT6;
    end else begin
      c.lut  = dual_table(tab16(g, 1'b0), tab16(g, 1'b1));
      c.mode = 1'b1;
      c.sel3 = SEL_LUT5;
    end
    return c;
  endfunction

  // Number of NR-OR LUTs in a tree that ORs w signals down to one.
  function automatic int unsigned nror_luts(input int unsigned w);
    int unsigned n, total;
    total = 0;
    n = w;
    while (n > 1) begin
      n = (n + NROR_FANIN - 1) / NROR_FANIN;
      total += n;
    end
    return total;
  endfunction

  // Width of level l of an NR-OR tree over w inputs (level 0 = the inputs).
  function automatic int unsigned tree_width(input int unsigned w, input int unsigned l);
    int unsigned n;
    n = w;
    for (int unsigned i = 0; i < l; i++) n = (n + NROR_FANIN - 1) / NROR_FANIN;
    return n;
  endfunction

  // Number of LUT levels of an NR-OR tree over w inputs.
  function automatic int unsigned tree_levels(input int unsigned w);
    int unsigned n, l;
    n = w;
    l = 0;
    while (n > 1) begin
      n = (n + NROR_FANIN - 1) / NROR_FANIN;
      l++;
    end
    return l;
  endfunction

  // Index of the first node of level l when all levels are numbered in
  // one flat array, inputs first.
  function automatic int unsigned tree_offset(input int unsigned w, input int unsigned l);
    int unsigned o;
    o = 0;
    for (int unsigned i = 0; i < l; i++) o += tree_width(w, i);
    return o;
  endfunction

  // LUTs of an n-bit DEFCON monitor: R-XORs, two NR-OR trees, one R-OR.
  function automatic int unsigned monitor_luts(input int unsigned n);
    return n + 2 * nror_luts(n) + 1;
  endfunction

  // ---------------------------------------------------------------------
  // Configurable logic block: 10 LUTs, 60 local routing MUXes with 61
  // sources each. Source numbering of a routing MUX: 0 = constant 0,
  // 1..40 = external inputs 0..39, 41 + 2*l + o = output o of LUT l.
  // A MUX is configured with 16 bits {grp[7:0], idx[7:0]}, one-hot per
  // stage: source s is selected by grp[s / 8] and idx[s % 8].
  localparam int unsigned CLB_LUTS  = 10;
  localparam int unsigned CLB_EXT   = 40;
  localparam int unsigned CLB_MUXES = 6 * CLB_LUTS;
  localparam int unsigned CLB_SRCS  = 1 + CLB_EXT + 2 * CLB_LUTS;
  localparam int unsigned RMUX_W    = 16;

  // Flat initial configurations: LUT l at [l*CFG_W +: CFG_W], MUX m at
  // [m*RMUX_W +: RMUX_W].
  typedef logic [CLB_LUTS*CFG_W-1:0]   clb_lut_init_t;
  typedef logic [CLB_MUXES*RMUX_W-1:0] clb_mux_init_t;

  function automatic int unsigned src_ext(input int unsigned e);
    return 1 + e;
  endfunction

  function automatic int unsigned src_lut(input int unsigned l, input int unsigned o);
    return 1 + CLB_EXT + 2 * l + o;
  endfunction

  function automatic logic [15:0] rmux_cfg(input int unsigned s);
    logic [15:0] c;
    c = '0;
    c[8 + s / 8] = 1'b1;
    c[s % 8]     = 1'b1;
    return c;
  endfunction

  // Placement of the three-output test circuit in one CLB.
  // External inputs: 0..2 unit 0 route 0 (A, B, C), 3..5 unit 1 route 0,
  // 6..8 unit 0 route 1, 9..11 unit 1 route 1, 12 correct_sw, 13 constant 1.
  // LUTs: 0..2 rxor A/B/C, 3 NR-OR of j, 4 NR-OR of k, 5 R-OR,
  // 6 block A/B, 7 block C, 8..9 unused.
  localparam int unsigned TC_CSW = 12;
  localparam int unsigned TC_ONE = 13;

  function automatic int unsigned tc_route(input int unsigned l, input int unsigned pin);
    int unsigned s;
    s = 0;
    if (l < 3) begin
      unique case (pin)
        0: s = src_ext(l);
        1: s = src_ext(3 + l);
        2: s = src_ext(6 + l);
        3: s = src_ext(9 + l);
        4: s = src_ext(TC_CSW);
        default: s = src_ext(TC_ONE);
      endcase
    end else if (l == 3 || l == 4) begin
      s = (pin < 3) ? src_lut(pin, l - 3) : 0;
    end else if (l == 5) begin
      unique case (pin)
        0, 2: s = src_lut(3, 0);
        1, 3: s = src_lut(4, 0);
        4: s = src_ext(TC_CSW);
        default: s = src_ext(TC_ONE);
      endcase
    end else if (l == 6 || l == 7) begin
      unique case (pin)
        0: s = (l == 6) ? src_ext(9) : src_ext(11);
        1: s = (l == 6) ? src_ext(10) : 0;
        2: s = src_lut(5, 0);
        3: s = src_lut(5, 1);
        4: s = src_ext(TC_CSW);
        default: s = src_ext(TC_ONE);
      endcase
    end
    return s;
  endfunction

  function automatic clb_lut_init_t tc_lut_init();
    clb_lut_init_t c;
    c = '0;
    for (int l = 0; l < CLB_LUTS; l++) begin
      if (l < 3)       c[l*CFG_W +: CFG_W] = gate_cfg(G_RXOR);
      else if (l < 5)  c[l*CFG_W +: CFG_W] = gate_cfg(G_NROR);
      else if (l == 5) c[l*CFG_W +: CFG_W] = gate_cfg(G_ROR);
      else if (l < 8)  c[l*CFG_W +: CFG_W] = gate_cfg(G_BLOCK2);
      else             c[l*CFG_W +: CFG_W] = '0;
    end
    return c;
  endfunction

  function automatic clb_mux_init_t tc_mux_init();
    clb_mux_init_t c;
    for (int m = 0; m < CLB_MUXES; m++) c[m*RMUX_W +: RMUX_W] = rmux_cfg(tc_route(m / 6, m % 6));
    return c;
  endfunction

endpackage
