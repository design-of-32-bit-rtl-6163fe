// tb_select_mux_block -- exhaustive check of the add-one / carry-select layer
// at WIDTH = 4. For every carry-in-0 result {c0, s0} and carry in, the
// first-zero nodes are worked out here from s0, and {cout, sum} must equal
// {c0, s0} + cin in WIDTH+1 bits. A watchdog ends a stalled run.
module tb_select_mux_block;

  localparam int W = 4;

  logic [W-1:0] s0, node_n, sum;
  logic         c0, cin, cout;
  int   checks = 0, failures = 0;

  select_mux_block #(.WIDTH(W)) dut (
    .s0(s0), .c0(c0), .node_n(node_n), .cin(cin), .sum(sum), .cout(cout)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (W + 2)); v++) begin
      logic [W:0] exp_r;
      {c0, s0, cin} = (W + 2)'(v);
      for (int k = 1; k <= W; k++) node_n[k-1] = (s0 & W'((1 << k) - 1)) != W'((1 << k) - 1);
      exp_r = {c0, s0} + (W + 1)'(cin);
      #1;
      checks++;
      if ({cout, sum} !== exp_r) begin
        failures++;
        $display("FAIL c0=%0b s0=%b cin=%0b -> %b expected %b", c0, s0, cin, {cout, sum}, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
