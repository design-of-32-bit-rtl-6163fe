// tb_word_sizes -- the adder at the three word sizes it is evaluated at:
// 8 bits (groups 2,2,4), 16 bits (groups 2,2,3,4,5) and 32 bits (the default
// groups 2,2,3,4,6,7,8). The 8-bit adder is checked exhaustively (all
// 2^17 operand and carry combinations); the 16- and 32-bit adders get
// 100,000 random vectors each plus the all-ones carry-chain cases.
// {cout, sum} must equal a + b + cin computed with 64-bit integers.
module tb_word_sizes
  import csla_pkg::*;
;

  int checks = 0, failures = 0;

  logic [7:0]  a8,  b8,  s8;   logic ci8,  co8;
  logic [15:0] a16, b16, s16;  logic ci16, co16;
  logic [31:0] a32, b32, s32;  logic ci32, co32;

  sqrt_csla_add_one #(.NGROUPS(CSLA8_NGROUPS),  .GROUP_W(CSLA8_GROUP_W),  .N(CSLA8_N))
    dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  sqrt_csla_add_one #(.NGROUPS(CSLA16_NGROUPS), .GROUP_W(CSLA16_GROUP_W), .N(CSLA16_N))
    dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  sqrt_csla_add_one dut32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string tag, longint unsigned got, longint unsigned a,
                       longint unsigned b, longint unsigned c, int n);
    longint unsigned exp_total = (a + b + c) & ((64'd1 << (n + 1)) - 1);
    checks++;
    if (got != exp_total) begin
      failures++;
      if (failures < 10) $display("FAIL %s %h + %h + %0d -> %h expected %h", tag, a, b, c, got, exp_total);
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {a8, b8, ci8} = 17'(v);
      #1;
      check("8b", {co8, s8}, a8, b8, ci8, 8);
    end
    for (int i = 0; i < 100002; i++) begin
      if (i < 2) begin
        a16 = '1; b16 = 16'(i); ci16 = 1'b1;
        a32 = '1; b32 = 32'(i); ci32 = 1'b1;
      end else begin
        a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
        a32 = $urandom;      b32 = $urandom;      ci32 = 1'($urandom);
      end
      #1;
      check("16b", {co16, s16}, a16, b16, ci16, 16);
      check("32b", {co32, s32}, a32, b32, ci32, 32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
