// ncl_csa_level: one level of a word-level Wallace tree.
//
// NI rows of W dual-rail bits come in; every complete group of three rows is
// reduced to a sum row and a carry row by an ncl_csa, and the one or two rows
// left over pass through unchanged. Output rows: 2*floor(NI/3) + NI mod 3,
// their sum equal to the input rows' sum modulo 2^W. Two gate delays.
module ncl_csa_level #(
  parameter int unsigned NI = 16,
  parameter int unsigned W  = 32
) (
  input  logic                                              eclk,
  input  logic                                              rst,
  input  ncl_pkg::dr_t [NI-1:0][W-1:0]                      rows_in,
  output ncl_pkg::dr_t [ncl_pkg::csa_rows(NI)-1:0][W-1:0]   rows_out
);
  localparam int unsigned G = NI / 3;

  for (genvar g = 0; g < G; g++) begin : g_csa
    ncl_csa #(.W(W)) u_csa (
      .eclk (eclk), .rst (rst),
      .x (rows_in[3*g]), .y (rows_in[3*g+1]), .z (rows_in[3*g+2]),
      .s (rows_out[2*g]), .c (rows_out[2*g+1]));
  end
  for (genvar r = 3 * G; r < NI; r++) begin : g_pass
    assign rows_out[2*G + (r - 3*G)] = rows_in[r];
  end
endmodule
