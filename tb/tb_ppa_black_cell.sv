// tb_ppa_black_cell: exhaustive self-check of both polarities of the black cell.
//
// Every combination of the four input bits (G_hi, P_hi, G_lo, P_lo) is
// applied to an ACTIVE_LOW_IN = 0 cell in true form and to an
// ACTIVE_LOW_IN = 1 cell in complemented form. The expected pair is the
// prefix operator G = G_hi | P_hi & G_lo, P = P_hi & P_lo, complemented for
// the first cell. A watchdog counts a failure if the run does not end in time.
module tb_ppa_black_cell;
  import ppa_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  gp_t hi_t, lo_t, out_t;    // cell with true inputs
  gp_t hi_n, lo_n, out_n;    // cell with complemented inputs

  ppa_black_cell #(.ACTIVE_LOW_IN(1'b0)) dut_t (.hi(hi_t), .lo(lo_t), .out(out_t));
  ppa_black_cell #(.ACTIVE_LOW_IN(1'b1)) dut_n (.hi(hi_n), .lo(lo_n), .out(out_n));

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
    logic gh, ph, gl, pl, eg, ep;
    for (int v = 0; v < 16; v++) begin
      {gh, ph, gl, pl} = 4'(v);
      eg = gh | (ph & gl);
      ep = ph & pl;
      hi_t = '{g: gh, p: ph};  lo_t = '{g: gl, p: pl};
      hi_n = '{g: ~gh, p: ~ph}; lo_n = '{g: ~gl, p: ~pl};
      @(posedge clk);
      #1;
      checks += 2;
      if (out_t !== '{g: ~eg, p: ~ep}) begin
        failures++;
        $display("FAIL true-in v=%0d out=%b expected ~{%b,%b}", v, out_t, eg, ep);
      end
      if (out_n !== '{g: eg, p: ep}) begin
        failures++;
        $display("FAIL compl-in v=%0d out=%b expected {%b,%b}", v, out_n, eg, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
