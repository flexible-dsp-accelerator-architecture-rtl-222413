// tb_ppa_adder_widths: self-check of the adder at other widths.
//
// WIDTH = 16 (the bus width of the three-stage block diagram) is checked with
// random operands, WIDTH = 8 and WIDTH = 5 (not a power of two) exhaustively
// over all operands and both carry-in values, and WIDTH = 1 (no prefix level
// at all) exhaustively. Results are compared with a + b + cin. A watchdog
// counts a failure if the run does not end in time.
module tb_ppa_adder_widths;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  logic [15:0] a16, b16, s16;  logic ci16, co16;
  logic [7:0]  a8,  b8,  s8;   logic ci8,  co8;
  logic [4:0]  a5,  b5,  s5;   logic ci5,  co5;
  logic        a1,  b1,  s1;   logic ci1,  co1;

  ppa_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  ppa_adder #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  ppa_adder #(.WIDTH(5))  dut5  (.a(a5),  .b(b5),  .cin(ci5),  .sum(s5),  .cout(co5));
  ppa_adder #(.WIDTH(1))  dut1  (.a(a1),  .b(b1),  .cin(ci1),  .sum(s1),  .cout(co1));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    for (int v = 0; v < (1 << 17); v++) begin
      logic [16:0] e16;
      logic [8:0]  e8;
      logic [5:0]  e5;
      logic [1:0]  e1;
      {ci8, a8, b8} = 17'(v);
      {ci5, a5, b5} = 11'(v);
      {ci1, a1, b1} = 3'(v);
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      if (v == 0) begin a16 = '1; b16 = '0; ci16 = 1'b1; end
      @(posedge clk);
      #1;
      e16 = 17'(a16) + 17'(b16) + 17'(ci16);
      e8  = 9'(a8) + 9'(b8) + 9'(ci8);
      e5  = 6'(a5) + 6'(b5) + 6'(ci5);
      e1  = 2'(a1) + 2'(b1) + 2'(ci1);
      checks += 2;
      if ({co16, s16} !== e16) begin
        failures++; $display("FAIL w16 %h+%h+%b=%b_%h", a16, b16, ci16, co16, s16);
      end
      if ({co8, s8} !== e8) begin
        failures++; $display("FAIL w8 %h+%h+%b=%b_%h", a8, b8, ci8, co8, s8);
      end
      if (v < (1 << 11)) begin
        checks++;
        if ({co5, s5} !== e5) begin
          failures++; $display("FAIL w5 %h+%h+%b=%b_%h", a5, b5, ci5, co5, s5);
        end
      end
      if (v < 8) begin
        checks++;
        if ({co1, s1} !== e1) begin
          failures++; $display("FAIL w1 %b+%b+%b=%b%b", a1, b1, ci1, co1, s1);
        end
      end
      n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
