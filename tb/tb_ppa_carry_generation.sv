// tb_ppa_carry_generation: self-check of the prefix carry network.
//
// Feeds generate/propagate vectors into the network at its default width of
// 32 bits (five levels, an odd count, so the final polarity fix is used) and
// at 16 bits (four levels) and 5 bits (a width that is not a power of two),
// and compares every carry with a bit-serial reference: c[i+1] = g[i] |
// p[i] & c[i], with c[0] = 0 because the carry-in is already folded into g[0].
// The vectors are random, plus long runs of propagate to exercise the
// longest carry paths. Only input pairs that the pre-processing stage can
// produce (g and p never both set) are used. A watchdog counts a failure if
// the run does not end in time.
module tb_ppa_carry_generation;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  logic [31:0] g32, p32;  logic [32:1] c32;
  logic [15:0] g16, p16;  logic [16:1] c16;
  logic [4:0]  g5,  p5;   logic [5:1]  c5;

  ppa_carry_generation              dut32 (.g(g32), .p(p32), .c(c32));
  ppa_carry_generation #(.WIDTH(16)) dut16 (.g(g16), .p(p16), .c(c16));
  ppa_carry_generation #(.WIDTH(5))  dut5  (.g(g5),  .p(p5),  .c(c5));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit-serial reference carries, carry[i] = carry into bit i
  function automatic logic [32:0] ref_carry(input logic [31:0] g, input logic [31:0] p, input int w);
    logic [32:0] r;
    r = '0;
    for (int i = 0; i < w; i++) r[i+1] = g[i] | (p[i] & r[i]);
    return r;
  endfunction

  initial begin
    logic [31:0] g, p;
    logic [32:0] r;
    for (int n = 0; n < 3000; n++) begin
      g = $urandom;
      p = $urandom & ~g;
      if (n % 4 == 1) begin  // long propagate run above a generate at bit 0
        p = '1 << 1;
        p[$urandom_range(31, 1)] = 1'b0;
        g = 32'd1;
      end
      if (n == 2) begin p = '1 << 1; g = 32'd1; end
      if (n == 0) begin g = 32'd2; p = 32'd1; end  // 3 + 2: carries 32'd2
      g32 = g; p32 = p; g16 = g[15:0]; p16 = p[15:0]; g5 = g[4:0]; p5 = p[4:0];
      @(posedge clk);
      #1;
      r = ref_carry(g, p, 32);
      checks++;
      if (c32 !== r[32:1]) begin
        failures++;
        $display("FAIL w32 g=%h p=%h c=%h exp %h", g, p, c32, r[32:1]);
      end
      r = ref_carry(g, p, 16);
      checks++;
      if (c16 !== r[16:1]) begin
        failures++;
        $display("FAIL w16 g=%h p=%h c=%h exp %h", g[15:0], p[15:0], c16, r[16:1]);
      end
      r = ref_carry(g, p, 5);
      checks++;
      if (c5 !== r[5:1]) begin
        failures++;
        $display("FAIL w5 g=%h p=%h c=%h exp %h", g[4:0], p[4:0], c5, r[5:1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
