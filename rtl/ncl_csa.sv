// ncl_csa: W-bit dual-rail carry-save adder, three words in, two words out.
//
// Bit i of the sum word is the full-adder sum of x[i], y[i], z[i]; bit i+1 of
// the carry word is that adder's carry. The carry word is already shifted:
// its bit 0 is a DATA0 that follows the wavefronts of x[0], and the carry out
// of bit W-1 is dropped (arithmetic modulo 2^W). So x + y + z = s + c
// (mod 2^W). Two gate delays (ncl_fa).
module ncl_csa #(
  parameter int unsigned W = 32
) (
  input  logic                 eclk,
  input  logic                 rst,
  input  ncl_pkg::dr_t [W-1:0] x,
  input  ncl_pkg::dr_t [W-1:0] y,
  input  ncl_pkg::dr_t [W-1:0] z,
  output ncl_pkg::dr_t [W-1:0] s,
  output ncl_pkg::dr_t [W-1:0] c
);
  ncl_pkg::dr_t [W-1:0] co;

  ncl_zero u_c0 (.eclk (eclk), .rst (rst), .ref_bit (x[0]), .z (c[0]));

  for (genvar i = 0; i < W; i++) begin : g_fa
    ncl_fa u_fa (.eclk (eclk), .rst (rst), .a (x[i]), .b (y[i]), .ci (z[i]), .s (s[i]), .co (co[i]));
    if (i < W - 1) begin : g_c
      assign c[i+1] = co[i];
    end
  end
endmodule
