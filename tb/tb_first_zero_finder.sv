// tb_first_zero_finder -- exhaustive check of the first-zero finder, 8 bits.
// For each s0 the index t of the lowest 0 is found by scanning; node k
// (node_n[k-1]) must be 0 for k <= t and 1 for k > t, i.e. 0 exactly when
// s0[k-1:0] is all ones. A watchdog ends a stalled run.
module tb_first_zero_finder;

  localparam int W = 8;

  logic [W-1:0] s0, node_n, exp_node_n;
  int   checks = 0, failures = 0;

  first_zero_finder #(.WIDTH(W)) dut (.s0(s0), .node_n(node_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      int t;
      s0 = W'(v);
      t  = W;                       // no zero at all
      for (int i = W - 1; i >= 0; i--) if (!s0[i]) t = i;
      for (int k = 1; k <= W; k++) exp_node_n[k-1] = (k > t);
      #1;
      checks++;
      if (node_n !== exp_node_n) begin
        failures++;
        $display("FAIL s0=%b node_n=%b expected %b", s0, node_n, exp_node_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
