// ncl_and: input-complete dual-rail AND (one partial-product bit).
//
// z.r1 is a TH22 of the two DATA1 rails. z.r0 is a THand0-type gate that sets
// when a0&b0, a0&b1 or a1&b0 holds; both rails reset only when all four input
// rails are NULL, so the output waits for both operands in both directions.
// Gate choice is this design's own. Timing: one eclk period.
module ncl_and (
  input  logic         eclk,
  input  logic         rst,
  input  ncl_pkg::dr_t a,
  input  ncl_pkg::dr_t b,
  output ncl_pkg::dr_t z
);
  ncl_thmn #(.M(2), .N(2)) u_z1 (.eclk (eclk), .rst (rst), .a ({b.r1, a.r1}), .z (z.r1));
  ncl_gate u_z0 (
    .eclk (eclk), .rst (rst),
    .set  ((a.r0 & b.r0) | (a.r0 & b.r1) | (a.r1 & b.r0)),
    .clr  (~(a.r0 | a.r1 | b.r0 | b.r1)),
    .z    (z.r0));
endmodule
