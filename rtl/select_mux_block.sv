// select_mux_block -- the "two input two select and mux" block of a carry
// select stage: add-one correction and carry selection in one layer.
//
// Inputs are the group's carry-in-0 result {c0, s0}, the first-zero nodes of
// s0 and the carry from the group below. Each of the WIDTH+1 result bits gets
// an inverter and one two_in_two_sel cell:
//   * bit 0 has no add-one multiplexer, since adding one always inverts it;
//     its cell sees the constant node 0 and is steered by cin alone;
//   * bit k (1..WIDTH-1) is inverted when cin = 1 and node k = 0;
//   * the carry is treated as bit WIDTH: c0 is inverted when cin = 1 and
//     node WIDTH = 0 (s0 all ones). This is the add-one carry, and it is exact
//     because s0 can only be all ones when c0 is 0.
// Result: {cout, sum} = {c0, s0} + cin. Combinational, one cell deep.
module select_mux_block #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] s0,
  input  logic             c0,
  input  logic [WIDTH-1:0] node_n,  // node_n[k-1] is node k
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] r0;      // carry-in-0 result {c0, s0}
  logic [WIDTH:0] r0_inv;  // its inverse, from the inverters
  logic [WIDTH:0] node;    // node[k] for k = 0..WIDTH

  assign r0     = {c0, s0};
  assign r0_inv = ~r0;
  assign node   = {node_n, 1'b0};

  for (genvar k = 0; k <= WIDTH; k++) begin : g_sel
    logic o;
    two_in_two_sel u_cell (
      .a (r0[k]),
      .b (r0_inv[k]),
      .s1(node[k]),
      .s2(cin),
      .o (o)
    );
    if (k < WIDTH) begin : g_sum
      assign sum[k] = o;
    end else begin : g_cout
      assign cout = o;
    end
  end

endmodule
