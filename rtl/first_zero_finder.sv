// first_zero_finder -- locates the first 0 of a group's carry-in-0 sum,
// counting from the least significant bit.
//
// Adding one to a binary number inverts every bit from the least significant
// one up to and including the first 0. So bit k of "s0 + 1" is inverted
// exactly when s0[k-1:0] is all ones. The finder reports this per bit as an
// active-low node: node k is 0 when no zero was found below bit k, and 1 once
// a zero has been seen. It is a serial chain, as in the transistor chains of
// the original circuit: node k = node k-1 | ~s0[k-1], starting from node 0 = 0.
//
// Interface: node_n[k-1] carries node k for k = 1..WIDTH. Node 0 is always 0
// and is not brought out; node WIDTH covers the whole sum and steers the
// group's carry. Purely combinational.
module first_zero_finder #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] s0,
  output logic [WIDTH-1:0] node_n
);

  always_comb begin
    logic seen_zero;  // a 0 has been found in the bits scanned so far
    seen_zero = 1'b0;
    for (int k = 0; k < WIDTH; k++) begin
      seen_zero = seen_zero | ~s0[k];
      node_n[k] = seen_zero;
    end
  end

endmodule
