// two_in_two_sel -- one multiplexer with a NAND in place of two cascaded
// multiplexers.
//
// Each result bit of a carry select stage would need two multiplexers: one
// in the add-one circuit, choosing between the carry-in-0 bit and its
// inverse, and one below it, choosing between the carry-in-0 and the
// carry-in-1 result by the group's carry in. Both choose between the same two
// values, so one 2:1 multiplexer suffices whose select is NAND(~s1, s2):
//   o = b  when s1 = 0 (all lower bits are 1) and s2 = 1 (carry in is 1),
//   o = a  otherwise.
// The NAND and its ~s1 input are as published; the select polarity (NAND
// output 0 selects b) follows from the add-one function. Combinational.
module two_in_two_sel (
  input  logic a,   // carry-in-0 result bit
  input  logic b,   // the same bit inverted
  input  logic s1,  // first-zero node of this bit, active low
  input  logic s2,  // carry into the group
  output logic o
);

  logic sel_a;  // NAND(~s1, s2)

  always_comb begin
    sel_a = ~(~s1 & s2);
    o     = sel_a ? a : b;
  end

endmodule
