// ncl_mac_loop: the accumulator feedback loop of the NCL MAC, with the
// reduction of indeterminate standby states.
//
// The loop adds a new product in carry-save form (PP1, PP2) to the old
// accumulator in carry-save form (A1, A2) with two levels of carry-save
// adders and feeds the new accumulator back. It is a ring of four full-word
// NCL registers carrying one DATA token:
//   REG2 (reset to DATA0 = accumulator 0) -> REG0 -> COMB1 -> REG1 -> COMB2
//   -> REGA (loop output register) -> back to REG2 and out to the adder.
// COMB1 is a carry-save adder over A1, A2 and PP1 (PP2 passes alongside it),
// COMB2 a carry-save adder over COMB1's two words and PP2. REG4 buffers the
// incoming product. Requests: COMP0 (completion of REG1) drives REG4's Ki;
// the completion of REG0 drives REG2's Ki; the completion of REGA drives
// REG1's Ki; REGA's Ki is a TH22 gate of REG2's completion and the adder's
// request; REG4's completion is the request sent to REG3, the output register
// of the partial-product pipeline.
//
// Indeterminate-state reduction (the point of the design): REG0's Ki is not
// COMP0 directly but the output of an asymmetric TH22 gate U1 with A = COMP0
// and B+ = NOT(REG3's Ko) through inverter U0. REG0's Ki falls whenever COMP0
// falls, but rises only when COMP0 is high and a new product is DATA. When
// the pipeline is flushed with NULL the product is NULL, REG0 never requests
// the accumulator, and the accumulator stays parked in REG2; REG0, COMB1,
// REG1, COMB2 and COMP0 all settle to fixed values (NULL, rfd) instead of
// values that depend on the accumulated data. In active operation a new
// product is always DATA when COMP0 rises, so the function is unchanged.
// The loop structure and the U0/U1 gating follow the reference design. The
// word width is a parameter; whole W-bit words are kept in every register
// (the reference trims them to 31 bits, see the README). The reset value 0
// of REGA's request gate is this design's choice (see below).
//
// Interface: pp1/pp2 and pp_ko from REG3; reg3_ki to REG3; a1/a2 the new
// accumulator in carry-save form (a1 + a2 = accumulator mod 2^W); out_ki the
// request from the adder's first register. Status outputs for observation:
// reg0_ki (U1's output) and comp0.
module ncl_mac_loop #(
  parameter int unsigned W = 32
) (
  input  logic                 eclk,
  input  logic                 rst,
  input  ncl_pkg::dr_t [W-1:0] pp1,
  input  ncl_pkg::dr_t [W-1:0] pp2,
  input  logic                 pp_ko,
  output logic                 reg3_ki,
  output ncl_pkg::dr_t [W-1:0] a1,
  output ncl_pkg::dr_t [W-1:0] a2,
  input  logic                 out_ki,
  output logic                 reg0_ki,
  output logic                 comp0
);
  import ncl_pkg::*;

  // REG4: product buffer
  dr_t  [W-1:0]   p1q, p2q;
  logic [2*W-1:0] reg4_ack;
  ncl_reg #(.W(2 * W)) u_reg4 (
    .eclk (eclk), .rst (rst), .d ({pp2, pp1}), .ki (comp0), .q ({p2q, p1q}), .ko (reg4_ack));
  ncl_comp #(.W(2 * W)) u_comp4 (.eclk (eclk), .rst (rst), .a (reg4_ack), .z (reg3_ki));

  // REG2: holds the accumulator in standby, reset to DATA0
  dr_t  [W-1:0]   r2a1, r2a2;
  logic [2*W-1:0] reg2_ack;
  logic           reg2_ki, reg2_done;
  ncl_reg #(.W(2 * W), .RST_DATA0(1'b1)) u_reg2 (
    .eclk (eclk), .rst (rst), .d ({a2, a1}), .ki (reg2_ki), .q ({r2a2, r2a1}), .ko (reg2_ack));
  ncl_comp #(.W(2 * W), .RST_VAL(1'b0)) u_comp2 (.eclk (eclk), .rst (rst), .a (reg2_ack), .z (reg2_done));

  // U0 / U1: REG0 may request DATA only while the new product is DATA
  logic u0_z;
  assign u0_z = ~pp_ko;
  ncl_th22_asym u_u1 (.eclk (eclk), .rst (rst), .a (comp0), .b (u0_z), .z (reg0_ki));

  // REG0: old accumulator into COMB1
  dr_t  [W-1:0]   r0a1, r0a2;
  logic [2*W-1:0] reg0_ack;
  ncl_reg #(.W(2 * W)) u_reg0 (
    .eclk (eclk), .rst (rst), .d ({r2a2, r2a1}), .ki (reg0_ki), .q ({r0a2, r0a1}), .ko (reg0_ack));
  ncl_comp #(.W(2 * W)) u_comp_r0 (.eclk (eclk), .rst (rst), .a (reg0_ack), .z (reg2_ki));

  // COMB1: A1 + A2 + PP1 -> S1 + C1, PP2 passes alongside
  dr_t [W-1:0] s1, c1;
  ncl_csa #(.W(W)) u_comb1 (.eclk (eclk), .rst (rst), .x (r0a1), .y (r0a2), .z (p1q), .s (s1), .c (c1));

  // REG1 (three words) and COMP0
  dr_t  [W-1:0]   r1s, r1c, r1p;
  logic [3*W-1:0] reg1_ack;
  logic           reg1_ki;
  ncl_reg #(.W(3 * W)) u_reg1 (
    .eclk (eclk), .rst (rst), .d ({p2q, c1, s1}), .ki (reg1_ki), .q ({r1p, r1c, r1s}), .ko (reg1_ack));
  ncl_comp #(.W(3 * W)) u_comp0 (.eclk (eclk), .rst (rst), .a (reg1_ack), .z (comp0));

  // COMB2: S1 + C1 + PP2 -> new A1 + A2
  dr_t [W-1:0] s2, c2;
  ncl_csa #(.W(W)) u_comb2 (.eclk (eclk), .rst (rst), .x (r1s), .y (r1c), .z (r1p), .s (s2), .c (c2));

  // REGA: loop output register; Ki = TH22(REG2 completion, adder request).
  // The gate starts at 0: REGA may take a new accumulator only after REG2 has
  // passed its NULL, otherwise the new value could merge into the old one.
  logic [2*W-1:0] rega_ack;
  logic           rega_ki;
  ncl_thmn #(.M(2), .N(2), .RST_VAL(1'b0)) u_rega_ki (
    .eclk (eclk), .rst (rst), .a ({out_ki, reg2_done}), .z (rega_ki));
  ncl_reg #(.W(2 * W)) u_rega (
    .eclk (eclk), .rst (rst), .d ({c2, s2}), .ki (rega_ki), .q ({a2, a1}), .ko (rega_ack));
  ncl_comp #(.W(2 * W)) u_comp_ra (.eclk (eclk), .rst (rst), .a (rega_ack), .z (reg1_ki));
endmodule
