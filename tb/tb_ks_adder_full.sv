// tb_ks_adder_full: the adder at its default configuration (32 bits, no
// parameter overrides), checked on directed corner cases and 20000 random
// operand pairs against the simulator's own 33-bit addition a + b + cin.
// Directed cases include the longest carry path (all bits propagate and
// cin = 1) and a carry generated at bit 0 that must reach the carry-out.
module tb_ks_adder_full;
  logic [31:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;
  int n_chain = 0, n_cout = 0;

  ks_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic apply(input logic [31:0] ta, input logic [31:0] tb, input logic tc);
    logic [32:0] exp;
    a = ta; b = tb; cin = tc;
    #1;
    exp = 33'(ta) + 33'(tb) + 33'(tc);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b -> %b_%h expected %b_%h", ta, tb, tc, cout, sum, exp[32], exp[31:0]);
    end
    if (tc && (ta ^ tb) == '1) n_chain++;
    if (exp[32]) n_cout++;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, 0);
    apply('1, '0, 1);
    apply('1, '1, 1);
    apply(32'h0000_0001, 32'hFFFF_FFFF, 0);
    apply(32'h8000_0000, 32'h8000_0000, 0);
    apply(32'h7FFF_FFFF, 32'h0000_0001, 0);
    apply(32'hDEAD_BEEF, 32'h2152_4110, 1);
    for (int n = 0; n < 20000; n++) apply($urandom, $urandom, 1'($urandom));
    if (n_chain == 0 || n_cout == 0) begin
      failures++;
      $display("FAIL corner cases not reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
