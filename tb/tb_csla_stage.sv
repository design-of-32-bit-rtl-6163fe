// tb_csla_stage -- exhaustive check of one carry select stage at widths 2, 3
// and 8 (the narrowest, an odd and the widest group of the 32-bit adder).
// {cout, sum} must equal a + b + cin as integers. The run also counts the
// cases where the carry in selects the add-one result and where adding one
// runs through the whole slice (a + b all ones, carry in 1), and fails if
// either never occurred.
module tb_csla_stage;

  int checks = 0, failures = 0;
  int n_cin1 = 0, n_full_ripple = 0;

  logic [1:0] a2, b2, s2;  logic ci2, co2;
  logic [2:0] a3, b3, s3;  logic ci3, co3;
  logic [7:0] a8, b8, s8;  logic ci8, co8;

  csla_stage #(.WIDTH(2)) dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));
  csla_stage #(.WIDTH(3)) dut3 (.a(a3), .b(b3), .cin(ci3), .sum(s3), .cout(co3));
  csla_stage #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));

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
    for (int v = 0; v < (1 << 7); v++) begin
      {a3, b3, ci3} = 7'(v);
      #1;
      checks++;
      if ({co3, s3} != 4'(int'(a3) + int'(b3) + int'(ci3))) begin
        failures++;
        $display("FAIL w3 %0d+%0d+%0d -> %0d", a3, b3, ci3, {co3, s3});
      end
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {a8, b8, ci8} = 17'(v);
      #1;
      checks++;
      if (ci8) n_cin1++;
      if (ci8 && (8'(a8 + b8) == 8'hFF)) n_full_ripple++;
      if ({co8, s8} != 9'(int'(a8) + int'(b8) + int'(ci8))) begin
        failures++;
        if (failures < 10) $display("FAIL w8 %0d+%0d+%0d -> %0d", a8, b8, ci8, {co8, s8});
      end
    end
    $display("carry in 1: %0d, add-one through whole slice: %0d", n_cin1, n_full_ripple);
    if (n_cin1 == 0)        begin failures++; $display("FAIL carry-in-1 path never used"); end
    if (n_full_ripple == 0) begin failures++; $display("FAIL full add-one ripple never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
