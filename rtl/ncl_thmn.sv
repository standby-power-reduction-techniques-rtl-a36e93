// ncl_thmn: THmn threshold gate with hysteresis, optionally weighted and
// optionally inverted.
//
// The output is asserted once at least M of the N inputs are asserted and is
// de-asserted only after all inputs are de-asserted; in between it holds. With
// W0 > 1 the first input counts W0 times (e.g. TH34w2: M=3, N=4, W0=2). With
// INV = 1 the output is inverted (the inverted TH12 gate that forms the Ko
// output of a register bit). THnn is an n-input C-element and TH1n an n-input
// OR gate. The set/hold/reset structure and the THmn definition follow the
// NCL gate description; weighting and inversion are the usual members of the
// 27-gate NCL library.
//
// Interface: a[N-1:0] gate inputs, z output. Timing: z follows a one eclk
// period later (see ncl_gate). RST_VAL is the output value under rst.
module ncl_thmn #(
  parameter int unsigned M       = 2,
  parameter int unsigned N       = 2,
  parameter int unsigned W0      = 1,
  parameter bit          INV     = 1'b0,
  parameter bit          RST_VAL = 1'b0
) (
  input  logic         eclk,
  input  logic         rst,
  input  logic [N-1:0] a,
  output logic         z
);
  initial begin
    assert (M >= 1 && M <= N + W0 - 1) else $error("ncl_thmn: threshold out of range");
  end

  logic [7:0] count;
  logic       q;

  always_comb begin
    count = 8'(W0) * 8'(a[0]);
    for (int i = 1; i < N; i++) count += 8'(a[i]);
  end

  ncl_gate #(.RST_VAL(RST_VAL ^ INV)) u_core (
    .eclk (eclk),
    .rst  (rst),
    .set  (count >= 8'(M)),
    .clr  (a == '0),
    .z    (q)
  );

  assign z = INV ? ~q : q;
endmodule
