// ppa_carry_generation: carry network of the parallel prefix adder.
//
// A Kogge-Stone prefix tree. It has LEVELS = ceil(log2(WIDTH)) levels; level k
// (k = 0..LEVELS-1) has distance d = 2**k and node i there merges node i with
// node i-d of the level before, so after level k node i covers bits
// max(0, i-2d+1)..i. Because the carry-in is already folded into bit 0 by the
// pre-processing stage, a group reaching bit 0 has a generate that is the
// final carry out of bit i. Node i of level k therefore uses
//   - no cell (only an inverter) when i < d: its group already reached bit 0,
//   - a gray cell when d <= i < 2d: the lower node reaches bit 0, so only the
//     generate is needed,
//   - a black cell when i >= 2d: generate and propagate are both needed.
// For WIDTH = 32 this gives 5 levels, 98 black and 31 gray cells. Using gray
// cells wherever a group reaches bit 0, instead of black cells throughout,
// is the adder's main saving.
//
// The cells are inverting, and the polarity alternates by level: level 0
// takes true (G,P) and gives complemented pairs, level 1 takes complemented
// and gives true ones, and so on. Nodes that need no cell at a level pass
// through an inverter to keep the polarity of their level. The complement
// left after an odd number of levels is removed at the output, so `c` is
// always active high.
//
// What follows the adder's description: the three-stage split, the black and
// gray cell equations, gray cells replacing black ones, two dot-cell kinds of
// opposite polarity, and the Kogge-Stone family. The exact wiring is not
// given there; the standard Kogge-Stone wiring above is this design's choice.
//
// Interface: `g`, `p` come from ppa_pre_processing (g[0] includes the
// carry-in); `c[i]` is the carry into bit i, i = 1..WIDTH, c[WIDTH] being the
// carry out. Purely combinational, no clock.
module ppa_carry_generation
  import ppa_pkg::*;
#(
  parameter int unsigned WIDTH = 32  // operand width in bits
) (
  input  logic [WIDTH-1:0] g,  // generate per bit, g[0] includes the carry-in
  input  logic [WIDTH-1:0] p,  // propagate per bit
  output logic [WIDTH:1]   c   // carry into bit i
);

  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 0;

  // Level k reads lvl_in (pairs of the level before, complemented when k is
  // odd) and drives lvl_out (opposite polarity).
  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    localparam int unsigned D = 1 << k;
    localparam bit INV = (k % 2) == 1;  // inputs of this level complemented

    gp_t lvl_in  [WIDTH];
    gp_t lvl_out [WIDTH];

    for (genvar i = 0; i < WIDTH; i++) begin : g_node
      if (k == 0) begin : g_src_pre
        assign lvl_in[i] = '{g: g[i], p: p[i]};
      end else begin : g_src_lvl
        assign lvl_in[i] = g_level[k-1].lvl_out[i];
      end

      if (i < D) begin : g_wire
        // group already reaches bit 0: keep it, flip polarity
        assign lvl_out[i] = ~lvl_in[i];
      end else if (i < 2 * D) begin : g_gray
        logic g_m;
        ppa_gray_cell #(.ACTIVE_LOW_IN(INV)) u_gray (
          .g_hi (lvl_in[i].g),
          .p_hi (lvl_in[i].p),
          .g_lo (lvl_in[i-D].g),
          .g_out(g_m)
        );
        // the merged group reaches bit 0: its propagate is no longer
        // used, it is held at "not propagate" in this level's polarity
        assign lvl_out[i] = '{g: g_m, p: INV};
      end else begin : g_black
        ppa_black_cell #(.ACTIVE_LOW_IN(INV)) u_black (
          .hi (lvl_in[i]),
          .lo (lvl_in[i-D]),
          .out(lvl_out[i])
        );
      end
    end
  end

  if (LEVELS == 0) begin : g_single
    // one bit: the folded generate is already the carry out
    assign c[1] = g[0];
  end else begin : g_final
    localparam bit OUT_INV = (LEVELS % 2) == 1;  // last level left complemented
    for (genvar i = 0; i < WIDTH; i++) begin : g_out
      assign c[i+1] = OUT_INV ? ~g_level[LEVELS-1].lvl_out[i].g
                              :  g_level[LEVELS-1].lvl_out[i].g;
    end
  end

endmodule
