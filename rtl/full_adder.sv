// full_adder -- one-bit full adder, the cell every ripple-carry adder of the
// design is built from.
//
// sum  = (a ^ b) ^ cin, written as two levels of XOR;
// cout = majority(a, b, cin).
// The published adder uses mirror adders, a transistor-level full adder whose
// carry path has no inverters; only the logic function is modelled here, so
// that speed-up does not show in the RTL. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;  // propagate: a ^ b

  always_comb begin
    p    = a ^ b;
    sum  = p ^ cin;
    cout = (a & b) | (p & cin);
  end

endmodule
