// tb_sqrt_csla_add_one -- end-to-end test of the 32-bit adder at its default
// parameters.
//
// Directed corner cases, vectors aimed at each group and 200,000 random
// vectors are applied; {cout, sum} must equal a + b + cin computed with
// 64-bit integers. For each carry select stage (groups 2 to 7, bit ranges
// 3:2, 6:4, 10:7, 16:11, 23:17, 31:24) the test counts, from the operands:
//   - carry in 0 (the carry-in-0 sum is passed through),
//   - carry in 1 (the add-one result is selected),
//   - add-one through the whole slice (slice sum all ones, carry in 1), so
//     the stage's carry out comes from the add-one circuit,
//   - carry out from the ripple-carry adder itself,
// and counts a failure for any that never happened. It also counts carries
// that ripple through all seven groups. Purely combinational, so the only
// timing checked is that results are settled 1 time unit after the inputs.
module tb_sqrt_csla_add_one;

  localparam int N  = 32;
  localparam int NG = 7;
  localparam int LO [NG] = '{0, 2, 4, 7, 11, 17, 24};
  localparam int W  [NG] = '{2, 2, 3, 4, 6, 7, 8};

  logic [N-1:0] a, b, sum;
  logic         cin, cout;

  int checks = 0, failures = 0;
  int n_cin0 [NG], n_cin1 [NG], n_addone_carry [NG], n_rca_carry [NG];
  int n_full_chain = 0;

  sqrt_csla_add_one dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned slice(logic [N-1:0] x, int g);
    return (longint'(x) >> LO[g]) & ((64'd1 << W[g]) - 1);
  endfunction

  task automatic apply(logic [N-1:0] va, logic [N-1:0] vb, logic vc);
    longint unsigned exp_total, carry;
    a = va; b = vb; cin = vc;
    #1;
    exp_total = longint'(va) + longint'(vb) + longint'(vc);
    checks++;
    if ({cout, sum} !== 33'(exp_total)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h + %0b -> %0b_%h expected %h", va, vb, vc, cout, sum, exp_total);
    end
    // Mechanism counters, from the operands alone.
    carry = longint'(vc);
    for (int g = 0; g < NG; g++) begin
      longint unsigned s0 = slice(va, g) + slice(vb, g);  // carry-in-0 result, W+1 bits
      longint unsigned ones = (64'd1 << W[g]) - 1;
      if (g > 0) begin
        if (carry == 0) n_cin0[g]++;
        else            n_cin1[g]++;
        if (carry == 1 && s0 == ones) n_addone_carry[g]++;
        if (s0 > ones) n_rca_carry[g]++;
      end
      carry = (s0 + carry) >> W[g];
    end
    if (vc && (va + vb == '1)) n_full_chain++;
  endtask

  initial begin
    foreach (n_cin0[g]) begin
      n_cin0[g] = 0; n_cin1[g] = 0; n_addone_carry[g] = 0; n_rca_carry[g] = 0;
    end

    // Corner cases.
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);           // carry ripples through every group
    apply('0, '1, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    apply(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    apply(32'hFFFF_FFFE, 32'h0000_0001, 1'b1);

    // Aimed at each group: slice sum all ones with carry in 1, and a slice
    // that generates its own carry, with random bits elsewhere.
    for (int g = 1; g < NG; g++) begin
      for (int r = 0; r < 50; r++) begin
        logic [N-1:0] ra, rb, mask;
        mask = N'(((64'd1 << W[g]) - 1) << LO[g]);
        ra = $urandom;
        rb = (~ra & mask) | ($urandom & ~mask);
        // force a carry into the group: all ones below it and cin = 1
        rb = (rb & ~N'((64'd1 << LO[g]) - 1)) | (~ra & N'((64'd1 << LO[g]) - 1));
        apply(ra, rb, 1'b1);
        apply(ra | mask, rb | mask, 1'($urandom));
      end
    end

    for (int i = 0; i < 200000; i++) apply($urandom, $urandom, 1'($urandom));

    for (int g = 1; g < NG; g++) begin
      $display("group %0d (bits %0d:%0d): cin0=%0d cin1=%0d add-one carry=%0d rca carry=%0d",
               g + 1, LO[g] + W[g] - 1, LO[g], n_cin0[g], n_cin1[g], n_addone_carry[g], n_rca_carry[g]);
      if (n_cin0[g] == 0 || n_cin1[g] == 0 || n_addone_carry[g] == 0 || n_rca_carry[g] == 0) begin
        failures++;
        $display("FAIL group %0d: a mechanism was never exercised", g + 1);
      end
    end
    $display("carry through all groups: %0d", n_full_chain);
    if (n_full_chain == 0) begin failures++; $display("FAIL full carry chain never exercised"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
