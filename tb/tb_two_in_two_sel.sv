// tb_two_in_two_sel -- exhaustive check of the merged multiplexer cell.
// The cell must behave like the two cascaded multiplexers it replaces: the
// first picks b (the inverted bit) when s1 = 0, the second takes that result
// when s2 = 1 and a otherwise. All 16 input combinations are applied.
module tb_two_in_two_sel;

  logic a, b, s1, s2, o;
  int   checks = 0, failures = 0;

  two_in_two_sel dut (.a(a), .b(b), .s1(s1), .s2(s2), .o(o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic first_mux, exp_o;
      {a, b, s1, s2} = 4'(v);
      first_mux = (s1 == 1'b0) ? b : a;
      exp_o     = (s2 == 1'b1) ? first_mux : a;
      #1;
      checks++;
      if (o !== exp_o) begin
        failures++;
        $display("FAIL a=%0b b=%0b s1=%0b s2=%0b -> o=%0b expected %0b", a, b, s1, s2, o, exp_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
