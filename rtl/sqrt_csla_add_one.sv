// sqrt_csla_add_one -- square-root carry select adder whose carry-in-1 sums
// come from add-one circuits instead of a second ripple-carry adder.
//
// The operands are cut into groups that widen towards the most significant
// end, so that each group's local addition finishes at about the time the
// carry from below arrives. At the default 32 bits the groups are
//   bits 1:0 | 3:2 | 6:4 | 10:7 | 16:11 | 23:17 | 31:24
//   (2, 2, 3, 4, 6, 7, 8 bits), joined by the carries C1, C3, C6, C10, C16, C23.
// Group 1 is a ripple-carry adder that takes the adder's carry in. Every
// other group is a csla_stage: it adds its slice with carry in 0 and turns
// that into the carry-in-1 result by adding one (invert up to the first 0),
// the choice being made by the carry from the group below.
//
// Interface: {cout, sum} = a + b + cin, N bits. Purely combinational, no clock.
// NGROUPS and GROUP_W select another word size (csla_pkg holds the 8- and
// 16-bit splits); the group widths must add up to N. The 32-bit grouping is
// the published one; the parameterisation is this design's addition.
module sqrt_csla_add_one
  import csla_pkg::*;
#(
  parameter int unsigned NGROUPS          = CSLA32_NGROUPS,
  parameter int unsigned GROUP_W [NGROUPS] = CSLA32_GROUP_W,
  parameter int unsigned N                = CSLA32_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  // Least significant bit of group g; group_lo(NGROUPS) is the total width.
  function automatic int unsigned group_lo(int unsigned g);
    int unsigned lo = 0;
    for (int unsigned i = 0; i < g; i++) lo += GROUP_W[i];
    return lo;
  endfunction

  if (group_lo(NGROUPS) != N) begin : g_bad_width
    $error("GROUP_W must add up to N");
  end

  // c[g] is the carry out of group g; cout is that of the last group.
  logic [NGROUPS-1:0] c;

  rca #(.WIDTH(GROUP_W[0])) u_group1 (
    .a   (a[GROUP_W[0]-1:0]),
    .b   (b[GROUP_W[0]-1:0]),
    .cin (cin),
    .sum (sum[GROUP_W[0]-1:0]),
    .cout(c[0])
  );

  for (genvar g = 1; g < NGROUPS; g++) begin : g_stage
    localparam int unsigned LO = group_lo(g);
    localparam int unsigned W  = GROUP_W[g];

    csla_stage #(.WIDTH(W)) u_css (
      .a   (a[LO+W-1:LO]),
      .b   (b[LO+W-1:LO]),
      .cin (c[g-1]),
      .sum (sum[LO+W-1:LO]),
      .cout(c[g])
    );
  end

  assign cout = c[NGROUPS-1];

endmodule
