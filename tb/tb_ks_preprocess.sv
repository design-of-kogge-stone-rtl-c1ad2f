// tb_ks_preprocess: checks the per-bit propagate/generate of the
// pre-processing stage at the default 32-bit width. For random and corner
// operands each bit's (p, g) must equal the two-bit sum a_i + b_i split
// into its low bit (p) and its carry (g).
module tb_ks_preprocess;
  import ks_pkg::*;

  localparam int unsigned W = 32;
  logic [W-1:0] a, b;
  pg_t  [W-1:0] pg;
  int checks = 0, failures = 0;

  ks_preprocess dut (.a(a), .b(b), .pg(pg));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [1:0] s;
    #1;
    for (int i = 0; i < W; i++) begin
      s = 2'(a[i]) + 2'(b[i]);
      checks++;
      if (pg[i].p !== s[0] || pg[i].g !== s[1]) begin
        failures++;
        $display("FAIL bit %0d a=%b b=%b -> p=%b g=%b", i, a[i], b[i], pg[i].p, pg[i].g);
      end
    end
  endtask

  initial begin
    a = '0; b = '0; check();
    a = '1; b = '0; check();
    a = '0; b = '1; check();
    a = '1; b = '1; check();
    for (int n = 0; n < 200; n++) begin
      a = $urandom; b = $urandom; check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
