// ppa_gray_cell: reduced prefix operator of the parallel prefix adder.
//
// It merges a more significant group `hi` with a less significant group whose
// generate already includes the carry into bit 0, so the merged generate is a
// final carry and no group propagate is needed:
//     G = G_hi | (P_hi & G_lo)
// Dropping the propagate half is what saves logic against a black cell.
//
// Like the black cell it is inverting: with ACTIVE_LOW_IN = 0 the inputs are
// true and the output is ~G (AOI21); with ACTIVE_LOW_IN = 1 the inputs are
// complemented and the output is G (OAI21). The equation is the adder's gray
// cell; the polarity handling is this design's choice.
//
// Purely combinational, no clock.
module ppa_gray_cell #(
  parameter bit ACTIVE_LOW_IN = 1'b0  // 0: inputs true, output complemented; 1: the reverse
) (
  input  logic g_hi,  // generate of the more significant group
  input  logic p_hi,  // propagate of the more significant group
  input  logic g_lo,  // generate of the lower group (reaches bit 0)
  output logic g_out  // merged generate, polarity opposite to the inputs
);

  always_comb begin
    if (ACTIVE_LOW_IN) g_out = ~(g_hi & (p_hi | g_lo));  // OAI21
    else               g_out = ~(g_hi | (p_hi & g_lo));  // AOI21
  end

endmodule
