// csla_stage -- one carry select stage (groups 2 and up) built with an
// add-one circuit instead of a second ripple-carry adder.
//
// A classic carry select stage adds its slice twice, with carry in 0 and 1,
// and picks one result by the carry from the stage below. Here only the
// carry-in-0 sum is computed (rca, cin tied to 0); the carry-in-1 result is
// that sum plus one, formed by inverting s0 from bit 0 up to its first zero.
// The first_zero_finder marks those bits, and select_mux_block inverts them,
// and the carry, only when the incoming carry is 1.
//
// Interface: WIDTH-bit slices a and b, the carry in from the previous stage,
// the WIDTH-bit sum and the carry out. Combinational. The path from cin to
// cout is one multiplexer cell, as in any carry select stage; the local path
// runs through the adder chain and then the zero-finder chain.
module csla_stage #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] s0;
  logic             c0;
  logic [WIDTH-1:0] node_n;

  rca #(.WIDTH(WIDTH)) u_rca0 (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (s0),
    .cout(c0)
  );

  first_zero_finder #(.WIDTH(WIDTH)) u_fzf (
    .s0    (s0),
    .node_n(node_n)
  );

  select_mux_block #(.WIDTH(WIDTH)) u_sel (
    .s0    (s0),
    .c0    (c0),
    .node_n(node_n),
    .cin   (cin),
    .sum   (sum),
    .cout  (cout)
  );

endmodule
