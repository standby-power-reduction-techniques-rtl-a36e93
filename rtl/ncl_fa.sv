// ncl_fa: dual-rail NCL full adder, two gate delays.
//
// The carry rails are TH23 gates (majority of the three DATA1 rails, and of
// the three DATA0 rails). Each sum rail is a TH34w2 gate whose weight-2 input
// is the opposite carry rail: s.r1 = TH34w2(co.r0, a1, b1, c1) and
// s.r0 = TH34w2(co.r1, a0, b0, c0). The sum gates see every input, so the
// adder is input-complete. The design description specifies its carry-save
// adders only as "2 gate delay"; this is the standard NCL adder with that
// depth. Timing: co after one eclk period, s after two.
module ncl_fa (
  input  logic         eclk,
  input  logic         rst,
  input  ncl_pkg::dr_t a,
  input  ncl_pkg::dr_t b,
  input  ncl_pkg::dr_t ci,
  output ncl_pkg::dr_t s,
  output ncl_pkg::dr_t co
);
  ncl_thmn #(.M(2), .N(3)) u_co1 (.eclk (eclk), .rst (rst), .a ({ci.r1, b.r1, a.r1}), .z (co.r1));
  ncl_thmn #(.M(2), .N(3)) u_co0 (.eclk (eclk), .rst (rst), .a ({ci.r0, b.r0, a.r0}), .z (co.r0));
  ncl_thmn #(.M(3), .N(4), .W0(2)) u_s1 (
    .eclk (eclk), .rst (rst), .a ({ci.r1, b.r1, a.r1, co.r0}), .z (s.r1));
  ncl_thmn #(.M(3), .N(4), .W0(2)) u_s0 (
    .eclk (eclk), .rst (rst), .a ({ci.r0, b.r0, a.r0, co.r1}), .z (s.r0));
endmodule
