// tb_ks_adder: end-to-end check of the Kogge-Stone adder at the widths of
// the tree family: 2, 4, 8, 16 and the default 32 bits.
//
// The 2-, 4- and 8-bit adders are checked exhaustively over all operand
// pairs and both carry-in values; the 16- and 32-bit adders with random and
// directed operands. Every result is compared with the integer sum
// a + b + cin computed by the simulator. The test also counts how often each
// carry mechanism of the adder was exercised and fails if one never was:
//   carry-in   : cin = 1 changed the sum
//   carry-out  : the addition overflowed (cout = 1)
//   full chain : every bit propagates and cin = 1, so the carry-in has to
//                travel from below bit 0 to the carry-out
//   long gen   : a carry generated at bit 0 propagates to the carry-out
module tb_ks_adder;
  int checks = 0, failures = 0;
  int n_cin = 0, n_cout = 0, n_chain = 0, n_longgen = 0;

  logic [1:0]  a2,  b2,  s2;  logic ci2,  co2;
  logic [3:0]  a4,  b4,  s4;  logic ci4,  co4;
  logic [7:0]  a8,  b8,  s8;  logic ci8,  co8;
  logic [15:0] a16, b16, s16; logic ci16, co16;
  logic [31:0] a32, b32, s32; logic ci32, co32;

  ks_adder #(.WIDTH(2))  dut2  (.a(a2),  .b(b2),  .cin(ci2),  .sum(s2),  .cout(co2));
  ks_adder #(.WIDTH(4))  dut4  (.a(a4),  .b(b4),  .cin(ci4),  .sum(s4),  .cout(co4));
  ks_adder #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  ks_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  ks_adder #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32));

  // compare one result of a w-bit adder and classify what it exercised
  task automatic check(input string tag, input int w, input logic [31:0] a,
                       input logic [31:0] b, input logic cin,
                       input logic [31:0] sum, input logic cout);
    logic [32:0] exp, mask;
    logic [31:0] p, exp_sum;
    exp     = 33'(a) + 33'(b) + 33'(cin);
    mask    = (33'd1 << w) - 33'd1;
    exp_sum = exp[31:0] & mask[31:0];
    checks++;
    if ((sum !== exp_sum) || (cout !== exp[w])) begin
      failures++;
      $display("FAIL %s a=%h b=%h cin=%b -> sum=%h cout=%b expected sum=%h cout=%b",
               tag, a, b, cin, sum, cout, exp_sum, exp[w]);
    end
    p = (a ^ b) & mask[31:0];
    if (cin && ((33'(a) + 33'(b)) & mask) != (exp & mask)) n_cin++;
    if (exp[w]) n_cout++;
    if (cin && p == mask[31:0]) n_chain++;
    if (a[0] && b[0] && (p | 32'd1) == mask[31:0]) n_longgen++;
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exhaustive: 2-bit (Fig. 4 size), 4-bit and 8-bit
    for (int v = 0; v < (1 << 5); v++) begin
      {ci2, a2, b2} = 5'(v);
      #1 check("w2", 2, 32'(a2), 32'(b2), ci2, 32'(s2), co2);
    end
    for (int v = 0; v < (1 << 9); v++) begin
      {ci4, a4, b4} = 9'(v);
      #1 check("w4", 4, 32'(a4), 32'(b4), ci4, 32'(s4), co4);
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {ci8, a8, b8} = 17'(v);
      #1 check("w8", 8, 32'(a8), 32'(b8), ci8, 32'(s8), co8);
    end
    // 16 and 32 bits: directed corners, then random and near-complement pairs
    for (int n = 0; n < 4000; n++) begin
      case (n)
        0: begin a16 = '1;  b16 = '0; ci16 = 1; a32 = '1;  b32 = '0; ci32 = 1; end
        1: begin a16 = '1;  b16 = '1; ci16 = 1; a32 = '1;  b32 = '1; ci32 = 1; end
        2: begin a16 = '0;  b16 = '0; ci16 = 0; a32 = '0;  b32 = '0; ci32 = 0; end
        3: begin a16 = 16'h5555; b16 = 16'hAAAB; ci16 = 0;
                 a32 = 32'h5555_5555; b32 = 32'hAAAA_AAAB; ci32 = 0; end
        default: begin
          a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
          a32 = $urandom;      b32 = $urandom;      ci32 = 1'($urandom);
          // near-complement pairs: every bit propagates except, half the
          // time, one randomly chosen bit
          if (n % 3 == 0) begin
            b16 = ~a16;
            b32 = ~a32;
            if ($urandom_range(1, 0) == 1) begin
              b16 ^= 16'd1 << $urandom_range(15, 0);
              b32 ^= 32'd1 << $urandom_range(31, 0);
            end
          end
        end
      endcase
      #1;
      check("w16", 16, 32'(a16), 32'(b16), ci16, 32'(s16), co16);
      check("w32", 32, a32, b32, ci32, s32, co32);
    end
    $display("mechanisms: carry-in=%0d carry-out=%0d full-chain=%0d long-generate=%0d",
             n_cin, n_cout, n_chain, n_longgen);
    if (n_cin == 0)     begin failures++; $display("FAIL carry-in never exercised"); end
    if (n_cout == 0)    begin failures++; $display("FAIL carry-out never exercised"); end
    if (n_chain == 0)   begin failures++; $display("FAIL full carry chain never exercised"); end
    if (n_longgen == 0) begin failures++; $display("FAIL long generate never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
