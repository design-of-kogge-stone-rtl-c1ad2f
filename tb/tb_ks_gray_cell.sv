// tb_ks_gray_cell: exhaustive check of the gray prefix cell.
// All 8 combinations of the upper group's (P,G) and the lower group's G are
// applied; the expected generate is the carry that leaves the upper group
// when the lower group's carry enters it.
module tb_ks_gray_cell;
  import ks_pkg::*;

  pg_t  hi;
  logic g_lo, g;
  int checks = 0, failures = 0;

  ks_gray_cell dut (.hi(hi), .g_lo(g_lo), .g(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_g;
    for (int v = 0; v < 8; v++) begin
      {hi.p, hi.g, g_lo} = 3'(v);
      #1;
      exp_g = hi.g ? 1'b1 : (hi.p ? g_lo : 1'b0);
      checks++;
      if (g !== exp_g) begin
        failures++;
        $display("FAIL hi=%b%b g_lo=%b -> g=%b expected %b", hi.p, hi.g, g_lo, g, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
