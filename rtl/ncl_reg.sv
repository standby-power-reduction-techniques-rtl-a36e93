// ncl_reg: W-bit dual-rail delay-insensitive (DI) NCL register, full-word.
//
// Each bit is two TH22 gates, one per rail, whose second input is the shared
// request Ki, and one inverted TH12 gate over the two output rails that gives
// the bit's acknowledge Ko. With Ki = 1 (request for DATA) a bit passes DATA
// from d to q; with Ki = 0 (request for NULL) it passes NULL; otherwise it
// holds, so consecutive DATA wavefronts stay separated by NULL. Ko[i] = 1
// while bit i holds NULL and 0 while it holds DATA. This is the register
// structure of the design description. RST_DATA0 selects the initial value:
// 0 gives NULL (both rail gates reset to '0'), 1 gives DATA0 (the rail-0 gate
// is resettable to '1'), as used for the accumulator register REG2.
//
// Interface: d/q dual-rail data, ki request from the completion logic of the
// following stage, ko per-bit acknowledge. Timing: q follows one eclk period
// after d and ki agree, ko one period after q.
module ncl_reg #(
  parameter int unsigned W         = 8,
  parameter bit          RST_DATA0 = 1'b0
) (
  input  logic                   eclk,
  input  logic                   rst,
  input  ncl_pkg::dr_t [W-1:0]   d,
  input  logic                   ki,
  output ncl_pkg::dr_t [W-1:0]   q,
  output logic         [W-1:0]   ko
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    ncl_thmn #(.M(2), .N(2), .RST_VAL(1'b0)) u_r1 (
      .eclk (eclk), .rst (rst), .a ({ki, d[i].r1}), .z (q[i].r1));
    ncl_thmn #(.M(2), .N(2), .RST_VAL(RST_DATA0)) u_r0 (
      .eclk (eclk), .rst (rst), .a ({ki, d[i].r0}), .z (q[i].r0));
    ncl_thmn #(.M(1), .N(2), .INV(1'b1), .RST_VAL(~RST_DATA0)) u_ko (
      .eclk (eclk), .rst (rst), .a ({q[i].r1, q[i].r0}), .z (ko[i]));
  end

  // A register never holds both rails of a bit asserted.
  for (genvar i = 0; i < W; i++) begin : g_chk
    a_legal: assert property (@(posedge eclk) disable iff (rst) !(q[i].r1 && q[i].r0))
      else $error("ncl_reg: illegal dual-rail value on bit %0d", i);
  end
endmodule
