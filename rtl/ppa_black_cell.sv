// ppa_black_cell: full prefix ("dot") operator of the parallel prefix adder.
//
// It merges the (G,P) pair of a more significant group `hi` with that of the
// adjacent less significant group `lo`:
//     G = G_hi | (P_hi & G_lo)      P = P_hi & P_lo
// Both the group generate and the group propagate are formed, so this cell is
// used wherever the merged group still has to be combined with lower bits.
//
// The cell is built in inverting logic, as the adder's description of the two
// dot cells asks: one kind takes active-high inputs and gives active-low
// outputs (AOI21 for G, NAND2 for P), the other takes active-low inputs and
// gives active-high outputs (OAI21 for G, NOR2 for P). ACTIVE_LOW_IN selects
// the kind; the output is always in the opposite polarity to the inputs.
// The equations follow the adder's black cell; the gate-level mapping of the
// two polarities onto AOI/OAI forms is this design's reading of that text.
//
// Purely combinational, no clock.
module ppa_black_cell
  import ppa_pkg::*;
#(
  parameter bit ACTIVE_LOW_IN = 1'b0  // 0: inputs true, outputs complemented; 1: the reverse
) (
  input  gp_t hi,   // pair of the more significant group
  input  gp_t lo,   // pair of the adjacent less significant group
  output gp_t out   // merged pair, polarity opposite to the inputs
);

  always_comb begin
    if (ACTIVE_LOW_IN) begin
      // inputs hold ~G, ~P: OAI21 and NOR2 give true G, P
      out.g = ~(hi.g & (hi.p | lo.g));
      out.p = ~(hi.p | lo.p);
    end else begin
      // inputs hold G, P: AOI21 and NAND2 give ~G, ~P
      out.g = ~(hi.g | (hi.p & lo.g));
      out.p = ~(hi.p & lo.p);
    end
  end

endmodule
