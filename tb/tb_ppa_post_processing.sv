// tb_ppa_post_processing: self-check of the sum stage.
//
// Drives random propagate and carry vectors and both carry-in values into a
// 32-bit instance and compares each sum bit with p[i] ^ (carry into bit i)
// and cout with the top carry. A watchdog counts a failure if the run does
// not end in time.
module tb_ppa_post_processing;
  localparam int unsigned W = 32;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  logic [W-1:0] p, sum;
  logic [W:1]   c;
  logic         cin, cout;

  ppa_post_processing dut (.p(p), .c(c), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] es;
    for (int n = 0; n < 2000; n++) begin
      p = $urandom;
      c = {1'($urandom), W'($urandom)};
      cin = 1'($urandom);
      if (n == 0) begin p = '1; c = '0; cin = 1'b1; end
      @(posedge clk);
      #1;
      for (int i = 0; i < W; i++) es[i] = p[i] ^ ((i == 0) ? cin : c[i]);
      checks++;
      if (sum !== es || cout !== c[W]) begin
        failures++;
        $display("FAIL p=%h c=%h cin=%b sum=%h exp %h cout=%b", p, c, cin, sum, es, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
