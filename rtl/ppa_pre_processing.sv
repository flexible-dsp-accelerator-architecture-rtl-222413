// ppa_pre_processing: first stage of the parallel prefix adder.
//
// For every bit position it forms the propagate p = a ^ b and the generate
// g = a & b. The carry-in enters here as well: it is merged into bit 0 so
// that the generate of bit 0 becomes g0 | (p0 & cin), the carry out of bit 0.
// The carry network then never has to treat the carry-in separately and every
// prefix group that reaches bit 0 yields a finished carry.
//
// The XOR/AND equations follow the adder's description; folding the carry-in
// into bit 0 (the carry-in drawn into this stage) is this design's way of
// wiring it. `p` stays the plain XOR, which the post-processing stage needs.
//
// Purely combinational, no clock.
module ppa_pre_processing #(
  parameter int unsigned WIDTH = 32  // operand width in bits
) (
  input  logic [WIDTH-1:0] a,    // first operand
  input  logic [WIDTH-1:0] b,    // second operand
  input  logic             cin,  // carry into bit 0
  output logic [WIDTH-1:0] g,    // generate per bit, bit 0 includes cin
  output logic [WIDTH-1:0] p     // propagate per bit (a ^ b)
);

  always_comb begin
    p = a ^ b;
    g = a & b;
    g[0] = (a[0] & b[0]) | ((a[0] ^ b[0]) & cin);
  end

endmodule
