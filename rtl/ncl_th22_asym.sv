// ncl_th22_asym: asymmetric TH22 gate (the gate U1 of the accumulator loop).
//
// The output is asserted when both A and B are asserted, and de-asserted as
// soon as A is de-asserted, whatever B is; otherwise it holds. B therefore
// only takes part in asserting the output (the input marked "+"). This is the
// behaviour the design description gives for U1; it is built on the common
// set/hold/reset core.
//
// Interface: a, b inputs, z output. Timing: one eclk period (see ncl_gate).
module ncl_th22_asym #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic eclk,
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic z
);
  ncl_gate #(.RST_VAL(RST_VAL)) u_core (
    .eclk (eclk),
    .rst  (rst),
    .set  (a & b),
    .clr  (~a),
    .z    (z)
  );
endmodule
