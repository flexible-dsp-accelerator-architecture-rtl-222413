// tb_ppa_gray_cell: exhaustive self-check of both polarities of the gray cell.
//
// All eight combinations of (G_hi, P_hi, G_lo) go to an ACTIVE_LOW_IN = 0
// cell in true form and to an ACTIVE_LOW_IN = 1 cell in complemented form;
// the expected generate is G_hi | P_hi & G_lo, complemented for the first
// cell. A watchdog counts a failure if the run does not end in time.
module tb_ppa_gray_cell;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  logic gh_t, ph_t, gl_t, go_t;
  logic gh_n, ph_n, gl_n, go_n;

  ppa_gray_cell #(.ACTIVE_LOW_IN(1'b0)) dut_t (
    .g_hi(gh_t), .p_hi(ph_t), .g_lo(gl_t), .g_out(go_t));
  ppa_gray_cell #(.ACTIVE_LOW_IN(1'b1)) dut_n (
    .g_hi(gh_n), .p_hi(ph_n), .g_lo(gl_n), .g_out(go_n));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic gh, ph, gl, eg;
    for (int v = 0; v < 8; v++) begin
      {gh, ph, gl} = 3'(v);
      eg = gh | (ph & gl);
      {gh_t, ph_t, gl_t} = {gh, ph, gl};
      {gh_n, ph_n, gl_n} = ~{gh, ph, gl};
      @(posedge clk);
      #1;
      checks += 2;
      if (go_t !== ~eg) begin
        failures++;
        $display("FAIL true-in v=%0d out=%b expected %b", v, go_t, ~eg);
      end
      if (go_n !== eg) begin
        failures++;
        $display("FAIL compl-in v=%0d out=%b expected %b", v, go_n, eg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
