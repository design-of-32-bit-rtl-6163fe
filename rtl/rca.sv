// rca -- WIDTH-bit ripple-carry adder.
//
// A chain of full adders: bit i takes the carry out of bit i-1, bit 0 takes
// cin, and cout is the carry out of the most significant bit. In the carry
// select adder it appears in two roles: as the first group (bits 1:0), fed by
// the adder's own carry in, and as the "carry in = 0" adder of every later
// group, with cin tied to 0. Every bit uses a full adder, also where the carry
// in is constant 0, as in the published two-bit group. Purely combinational;
// the delay from cin to cout grows linearly with WIDTH.
module rca #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;
  assign cout = c[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

endmodule
