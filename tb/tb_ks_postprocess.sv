// tb_ks_postprocess: checks the sum/carry-out stage at the default 32-bit
// width. Random propagate and carry vectors are applied; each sum bit must
// be the parity of its propagate and the carry entering it (cin for bit 0,
// the carry out of the bit below otherwise), and cout the top carry.
module tb_ks_postprocess;
  localparam int unsigned W = 32;
  logic [W-1:0] p, c, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  ks_postprocess dut (.p(p), .c(c), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic carry_in;
    logic [W-1:0] exp_sum;
    for (int n = 0; n < 300; n++) begin
      p = $urandom; c = $urandom; cin = 1'($urandom);
      #1;
      for (int i = 0; i < W; i++) begin
        carry_in   = (i == 0) ? cin : c[i-1];
        exp_sum[i] = (p[i] != carry_in);
      end
      checks++;
      if (sum !== exp_sum || cout !== c[W-1]) begin
        failures++;
        $display("FAIL p=%h c=%h cin=%b -> sum=%h cout=%b expected %h %b",
                 p, c, cin, sum, cout, exp_sum, c[W-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
