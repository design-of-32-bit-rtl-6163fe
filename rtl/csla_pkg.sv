// csla_pkg -- shared constants of the square-root carry select adder.
//
// The 32-bit adder is cut into seven groups whose widths grow from the least
// significant end: 2, 2, 3, 4, 6, 7 and 8 bits (bits 1:0, 3:2, 6:4, 10:7,
// 16:11, 23:17 and 31:24). The first group is a plain ripple-carry adder; each
// later group is a carry select stage fed by the carry of the group below.
// The 32-bit split is the one of the published design; the 16-bit split
// (2, 2, 3, 4, 5) matches the per-group gate counts given for the 16-bit
// version, and the 8-bit split (2, 2, 4) is this package's own choice.
package csla_pkg;

  localparam int unsigned CSLA32_N       = 32;
  localparam int unsigned CSLA32_NGROUPS = 7;
  localparam int unsigned CSLA32_GROUP_W [CSLA32_NGROUPS] = '{2, 2, 3, 4, 6, 7, 8};

  localparam int unsigned CSLA16_N       = 16;
  localparam int unsigned CSLA16_NGROUPS = 5;
  localparam int unsigned CSLA16_GROUP_W [CSLA16_NGROUPS] = '{2, 2, 3, 4, 5};

  localparam int unsigned CSLA8_N        = 8;
  localparam int unsigned CSLA8_NGROUPS  = 3;
  localparam int unsigned CSLA8_GROUP_W  [CSLA8_NGROUPS]  = '{2, 2, 4};

endpackage
