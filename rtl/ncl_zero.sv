// ncl_zero: dual-rail constant 0 that follows the wavefronts of a reference bit.
//
// An NCL constant must be NULL during a NULL wavefront and DATA0 during a
// DATA wavefront. The rail-0 output is a TH12 (OR) of the reference bit's
// rails; the rail-1 output is tied to 0. Used for the zero positions of
// partial-product rows and for bit 0 of a carry word. Timing: one eclk period.
module ncl_zero (
  input  logic         eclk,
  input  logic         rst,
  input  ncl_pkg::dr_t ref_bit,
  output ncl_pkg::dr_t z
);
  ncl_thmn #(.M(1), .N(2)) u_z0 (
    .eclk (eclk), .rst (rst), .a ({ref_bit.r1, ref_bit.r0}), .z (z.r0));
  assign z.r1 = 1'b0;
endmodule
