// ncl_ha: input-complete dual-rail half adder (this design's own gate choice).
//
// Carry: c.r1 = TH22(a1, b1); c.r0 sets on a0&b0, a0&b1 or a1&b0. Sum: s.r1
// sets on a1&b0 or a0&b1, s.r0 on a0&b0 or a1&b1. Every gate resets only when
// all its input rails are NULL. Timing: one eclk period.
module ncl_ha (
  input  logic         eclk,
  input  logic         rst,
  input  ncl_pkg::dr_t a,
  input  ncl_pkg::dr_t b,
  output ncl_pkg::dr_t s,
  output ncl_pkg::dr_t c
);
  logic all_null;
  assign all_null = ~(a.r0 | a.r1 | b.r0 | b.r1);

  ncl_thmn #(.M(2), .N(2)) u_c1 (.eclk (eclk), .rst (rst), .a ({b.r1, a.r1}), .z (c.r1));
  ncl_gate u_c0 (.eclk (eclk), .rst (rst),
                 .set ((a.r0 & b.r0) | (a.r0 & b.r1) | (a.r1 & b.r0)), .clr (all_null), .z (c.r0));
  ncl_gate u_s1 (.eclk (eclk), .rst (rst),
                 .set ((a.r1 & b.r0) | (a.r0 & b.r1)), .clr (all_null), .z (s.r1));
  ncl_gate u_s0 (.eclk (eclk), .rst (rst),
                 .set ((a.r0 & b.r0) | (a.r1 & b.r1)), .clr (all_null), .z (s.r0));
endmodule
