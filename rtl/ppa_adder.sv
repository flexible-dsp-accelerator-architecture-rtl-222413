// ppa_adder: parallel prefix adder, top level.
//
// Adds two WIDTH-bit operands and a carry-in in three stages:
//   1. ppa_pre_processing  - per-bit propagate (a^b) and generate (a&b), with
//                            the carry-in merged into bit 0;
//   2. ppa_carry_generation - a Kogge-Stone prefix tree of black and gray
//                            cells in alternating polarity, giving every carry
//                            in ceil(log2(WIDTH)) cell levels;
//   3. ppa_post_processing - sum bit = propagate ^ incoming carry.
// No bit waits for the sum of the bit below it; the carry delay grows with
// log2(WIDTH) rather than WIDTH.
//
// Interface: `a`, `b`, `cin` in, `sum` and `cout` out (for the 32-bit default
// these are the c0 and c32 of the usual naming). The default width of 32
// bits is the width of the adder that was built and simulated in the
// description; its block diagram draws 16-bit buses, which WIDTH = 16 gives.
// Purely combinational: there is no clock, register or handshake, so the
// result is valid one combinational delay after the inputs settle.
module ppa_adder #(
  parameter int unsigned WIDTH = 32  // operand width in bits
) (
  input  logic [WIDTH-1:0] a,     // first operand
  input  logic [WIDTH-1:0] b,     // second operand
  input  logic             cin,   // carry into bit 0
  output logic [WIDTH-1:0] sum,   // a + b + cin, low WIDTH bits
  output logic             cout   // carry out of bit WIDTH-1
);

  logic [WIDTH-1:0] g;  // generate per bit, bit 0 includes cin
  logic [WIDTH-1:0] p;  // propagate per bit
  logic [WIDTH:1]   c;  // carry into bit i

  ppa_pre_processing #(.WIDTH(WIDTH)) u_pre (
    .a  (a),
    .b  (b),
    .cin(cin),
    .g  (g),
    .p  (p)
  );

  ppa_carry_generation #(.WIDTH(WIDTH)) u_carry (
    .g(g),
    .p(p),
    .c(c)
  );

  ppa_post_processing #(.WIDTH(WIDTH)) u_post (
    .p   (p),
    .c   (c),
    .cin (cin),
    .sum (sum),
    .cout(cout)
  );

endmodule
