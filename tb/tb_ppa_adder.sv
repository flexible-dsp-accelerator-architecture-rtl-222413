// tb_ppa_adder: end-to-end self-check of the adder at its default width (32).
//
// The adder is instantiated with no parameter override. Stimulus:
//   - the worked example of the 32-bit simulation: a = 3, b = 2, c0 = 0,
//     giving sum = 5 and c32 = 0;
//   - directed corner cases (all ones, all zeros, alternating patterns);
//   - long carry chains: p set on every bit and the carry entering at bit 0,
//     so the carry crosses all 32 positions;
//   - random operands with random carry-in.
// Sum and carry out are compared with a + b + cin formed in 33-bit integer
// arithmetic. The run also counts how often each mechanism of the adder was
// exercised - the carry-in folded into bit 0 deciding the result, a carry
// out of the top bit, and a carry rippling through the whole word - and
// counts a failure for any that never happened. A watchdog counts a failure
// if the run does not end in time.
module tb_ppa_adder;
  localparam int unsigned W = 32;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  int n_cin_used = 0;     // cin = 1 changed the result
  int n_carry_out = 0;    // carry out of the top bit
  int n_full_chain = 0;   // carry from bit 0 propagated to the carry out

  logic [W-1:0] a, b, sum;
  logic cin, cout;

  ppa_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] exp_v;
    a = ta; b = tb_; cin = tc;
    @(posedge clk);
    #1;
    exp_v = {1'b0, ta} + {1'b0, tb_} + {{W{1'b0}}, tc};
    checks++;
    if ({cout, sum} !== exp_v) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b -> cout=%b sum=%h, expected %b %h",
               ta, tb_, tc, cout, sum, exp_v[W], exp_v[W-1:0]);
    end
    if (tc) n_cin_used++;
    if (exp_v[W]) n_carry_out++;
    if (((ta ^ tb_) == '1) && tc) n_full_chain++;
  endtask

  initial begin
    // worked example: 3 + 2 = 5
    check_one(32'd3, 32'd2, 1'b0);

    check_one('0, '0, 1'b0);
    check_one('0, '0, 1'b1);
    check_one('1, '0, 1'b1);          // carry ripples through every bit
    check_one('0, '1, 1'b1);
    check_one('1, '1, 1'b1);
    check_one('1, 32'd1, 1'b0);
    check_one(32'hAAAA_AAAA, 32'h5555_5555, 1'b1);
    check_one(32'h8000_0000, 32'h8000_0000, 1'b0);
    check_one(32'h7FFF_FFFF, 32'd1, 1'b0);
    for (int n = 0; n < 200; n++) begin
      logic [W-1:0] r;
      r = $urandom;
      check_one(r, ~r, 1'b1);          // all-propagate with carry-in
    end
    for (int n = 0; n < 5000; n++) check_one($urandom, $urandom, 1'($urandom));

    $display("mechanisms: cin_used=%0d carry_out=%0d full_chain=%0d",
             n_cin_used, n_carry_out, n_full_chain);
    checks += 3;
    if (n_cin_used == 0)   begin failures++; $display("FAIL carry-in never exercised"); end
    if (n_carry_out == 0)  begin failures++; $display("FAIL carry out never exercised"); end
    if (n_full_chain == 0) begin failures++; $display("FAIL full carry chain never exercised"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
