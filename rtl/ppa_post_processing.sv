// ppa_post_processing: last stage of the parallel prefix adder.
//
// Each sum bit is the bit's propagate XORed with the carry into that bit:
// sum[0] = p[0] ^ cin and sum[i] = p[i] ^ c[i]. The carry out of the top bit
// is passed on as `cout`. This follows the adder's post-processing equation.
//
// Interface: `c[i]` (i = 1..WIDTH) is the carry into bit i, so c[WIDTH] is the
// carry out. `cout` is that top carry wired straight through; it is kept as a
// port of this stage so that the stage owns both results of the adder.
// Purely combinational, no clock.
module ppa_post_processing #(
  parameter int unsigned WIDTH = 32  // operand width in bits
) (
  input  logic [WIDTH-1:0] p,     // propagate per bit
  input  logic [WIDTH:1]   c,     // carry into bit i, c[WIDTH] = carry out
  input  logic             cin,   // carry into bit 0
  output logic [WIDTH-1:0] sum,   // sum bits
  output logic             cout   // carry out of the top bit
);

  logic [WIDTH:0] carry;  // carry into every bit, carry[0] = cin

  always_comb begin
    carry = {c, cin};
    sum   = p ^ carry[WIDTH-1:0];
    cout  = carry[WIDTH];
  end

endmodule
