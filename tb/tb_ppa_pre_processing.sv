// tb_ppa_pre_processing: self-check of the propagate/generate stage.
//
// Applies directed and random 32-bit operand pairs with both carry-in values
// and compares p and g bit by bit with values formed here: p = a ^ b, g = a & b
// except bit 0, which must be the carry out of bit 0 (majority of a0, b0, cin).
// A watchdog counts a failure if the run does not end in time.
module tb_ppa_pre_processing;
  localparam int unsigned W = 32;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  logic [W-1:0] a, b, g, p;
  logic cin;

  ppa_pre_processing dut (.a(a), .b(b), .cin(cin), .g(g), .p(p));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W-1:0] eg, ep;
    a = ta; b = tb_; cin = tc;
    @(posedge clk);
    #1;
    for (int i = 0; i < W; i++) begin
      ep[i] = (ta[i] != tb_[i]);
      eg[i] = ta[i] && tb_[i];
    end
    // carry out of bit 0: at least two of a0, b0, cin set
    eg[0] = (int'(ta[0]) + int'(tb_[0]) + int'(tc)) >= 2;
    checks++;
    if (g !== eg || p !== ep) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b g=%h/%h p=%h/%h", ta, tb_, tc, g, eg, p, ep);
    end
  endtask

  initial begin
    // the example of the 32-bit simulation: 3 + 2, g = 2, p = 1
    check_one(32'd3, 32'd2, 1'b0);
    check_one(32'd1, 32'd0, 1'b1);
    check_one(32'd0, 32'd0, 1'b1);
    check_one('1, '1, 1'b1);
    check_one('1, '0, 1'b0);
    for (int n = 0; n < 2000; n++) check_one($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
