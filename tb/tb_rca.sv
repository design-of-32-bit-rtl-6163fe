// tb_rca -- exhaustive check of the ripple-carry adder at widths 2, 5 and 8.
// Every (a, b, cin) is applied to each instance and {cout, sum} is compared
// with a + b + cin computed as a plain integer. A watchdog ends a stalled run.
module tb_rca;

  int checks = 0, failures = 0;

  logic [1:0] a2, b2, s2;  logic ci2, co2;
  logic [4:0] a5, b5, s5;  logic ci5, co5;
  logic [7:0] a8, b8, s8;  logic ci8, co8;

  rca #(.WIDTH(2)) dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));
  rca #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .cin(ci5), .sum(s5), .cout(co5));
  rca #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 5); v++) begin
      {a2, b2, ci2} = 5'(v);
      #1;
      checks++;
      if ({co2, s2} != 3'(int'(a2) + int'(b2) + int'(ci2))) begin
        failures++;
        $display("FAIL w2 %0d+%0d+%0d -> %0d", a2, b2, ci2, {co2, s2});
      end
    end
    for (int v = 0; v < (1 << 11); v++) begin
      {a5, b5, ci5} = 11'(v);
      #1;
      checks++;
      if ({co5, s5} != 6'(int'(a5) + int'(b5) + int'(ci5))) begin
        failures++;
        $display("FAIL w5 %0d+%0d+%0d -> %0d", a5, b5, ci5, {co5, s5});
      end
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {a8, b8, ci8} = 17'(v);
      #1;
      checks++;
      if ({co8, s8} != 9'(int'(a8) + int'(b8) + int'(ci8))) begin
        failures++;
        if (failures < 10) $display("FAIL w8 %0d+%0d+%0d -> %0d", a8, b8, ci8, {co8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
