// tb_ks_black_cell: exhaustive check of the black prefix cell.
// All 16 combinations of (P,G) for the upper and lower group are applied and
// the merged group compared with the group-merge rule evaluated by
// enumeration: the merged group generates if the upper part generates or
// the upper part propagates a carry the lower part generates, and it
// propagates if both parts propagate.
module tb_ks_black_cell;
  import ks_pkg::*;

  pg_t hi, lo, y;
  int checks = 0, failures = 0;

  ks_black_cell dut (.hi(hi), .lo(lo), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_p, exp_g;
    for (int v = 0; v < 16; v++) begin
      {hi.p, hi.g, lo.p, lo.g} = 4'(v);
      #1;
      // truth-table form: carry leaves the merged group with cin=0 / cin=1
      exp_g = hi.g ? 1'b1 : (hi.p ? lo.g : 1'b0);
      exp_p = (hi.p == 1'b1) && (lo.p == 1'b1);
      checks++;
      if (y.p !== exp_p || y.g !== exp_g) begin
        failures++;
        $display("FAIL hi=%b%b lo=%b%b -> y=%b%b expected %b%b",
                 hi.p, hi.g, lo.p, lo.g, y.p, y.g, exp_p, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
