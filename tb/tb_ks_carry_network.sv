// tb_ks_carry_network: checks the Kogge-Stone carry tree against a
// bit-serial (ripple) carry model. Operands are turned into bit
// propagate/generate pairs here, and every carry c[i] of the tree must equal
// the carry out of bit i of a + b + cin computed one bit at a time.
// Widths 4, 16 and the default 32 are covered (exhaustively at 4 bits),
// including a width that is not a power of two (12).
module tb_ks_carry_network;
  import ks_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, c4;   logic cin4;   pg_t [3:0]  pg4;
  logic [11:0] a12, b12, c12; logic cin12; pg_t [11:0] pg12;
  logic [15:0] a16, b16, c16; logic cin16; pg_t [15:0] pg16;
  logic [31:0] a32, b32, c32; logic cin32; pg_t [31:0] pg32;

  always_comb for (int i = 0; i < 4;  i++) pg4[i]  = '{p: a4[i]  ^ b4[i],  g: a4[i]  & b4[i]};
  always_comb for (int i = 0; i < 12; i++) pg12[i] = '{p: a12[i] ^ b12[i], g: a12[i] & b12[i]};
  always_comb for (int i = 0; i < 16; i++) pg16[i] = '{p: a16[i] ^ b16[i], g: a16[i] & b16[i]};
  always_comb for (int i = 0; i < 32; i++) pg32[i] = '{p: a32[i] ^ b32[i], g: a32[i] & b32[i]};

  ks_carry_network #(.WIDTH(4))  dut4  (.pg(pg4),  .cin(cin4),  .c(c4));
  ks_carry_network #(.WIDTH(12)) dut12 (.pg(pg12), .cin(cin12), .c(c12));
  ks_carry_network #(.WIDTH(16)) dut16 (.pg(pg16), .cin(cin16), .c(c16));
  ks_carry_network               dut32 (.pg(pg32), .cin(cin32), .c(c32));

  // ripple reference: carry out of every bit position
  function automatic logic [31:0] ripple(input logic [31:0] a, input logic [31:0] b,
                                         input logic cin, input int w);
    logic carry;
    logic [31:0] r;
    r = '0;
    carry = cin;
    for (int i = 0; i < w; i++) begin
      carry = (a[i] & b[i]) | (a[i] & carry) | (b[i] & carry);
      r[i] = carry;
    end
    return r;
  endfunction

  task automatic compare(input string tag, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s carries %h expected %h", tag, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin4, a4, b4} = 9'(v);
      #1 compare("w4", 32'(c4), ripple(32'(a4), 32'(b4), cin4, 4));
    end
    for (int n = 0; n < 500; n++) begin
      a12 = 12'($urandom); b12 = 12'($urandom); cin12 = 1'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom); cin16 = 1'($urandom);
      a32 = $urandom;      b32 = $urandom;      cin32 = 1'($urandom);
      // every 4th vector: long propagate runs (b = ~a except a few bits)
      if (n % 4 == 0) begin
        b12 = ~a12 ^ 12'(1 << (n % 12));
        b16 = ~a16 ^ 16'(1 << (n % 16));
        b32 = ~a32 ^ (32'd1 << (n % 32));
      end
      #1;
      compare("w12", 32'(c12), ripple(32'(a12), 32'(b12), cin12, 12));
      compare("w16", 32'(c16), ripple(32'(a16), 32'(b16), cin16, 16));
      compare("w32", c32, ripple(a32, b32, cin32, 32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
