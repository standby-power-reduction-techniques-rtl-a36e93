// ncl_rca_pipe: full-word pipelined NCL ripple-carry adder that turns the
// carry-save accumulator (A1, A2) into the binary result A = A1 + A2 mod 2^W.
//
// A2 is a shifted carry word, so its bit 0 is always DATA0. Section 1 adds bit
// 0 with a half adder and bits 1-2 with full adders; sections 2 to S-1 add two
// bits each; section S adds the last two carry-propagating bits and bit W-1,
// whose carry out is dropped. Bits 1..W-2 thus form a (W-2)-bit ripple-carry
// adder (30 bits for W = 32), spread over S = (W-2)/2 = 15 pipeline stages,
// as the document gives. Each section ends in a full-word NCL register that
// holds the result bits done so far, the carry into the next bit and the
// operand bits still to add; its request comes from the completion of the
// next register, the last register's from out_ki. The exact split of bits
// into sections and the half adder at bit 0 are this design's choices.
//
// Interface: a1, a2 dual-rail operands; in_ko request to the producer
// (1: ready for DATA); a the result; out_ki request from the consumer.
module ncl_rca_pipe #(
  parameter int unsigned W = 32
) (
  input  logic                 eclk,
  input  logic                 rst,
  input  ncl_pkg::dr_t [W-1:0] a1,
  input  ncl_pkg::dr_t [W-1:0] a2,
  output logic                 in_ko,
  output ncl_pkg::dr_t [W-1:0] a,
  input  logic                 out_ki
);
  import ncl_pkg::*;

  localparam int unsigned S = (W - 2) / 2;

  initial begin
    assert (W % 2 == 0 && W >= 6) else $error("ncl_rca_pipe: W must be even and at least 6");
  end

  logic [S:1] done;   // completion of each stage register

  for (genvar k = 1; k <= S; k++) begin : g_st
    localparam int unsigned LO = (k == 1) ? 0 : 2 * k - 1;    // first bit added here
    localparam int unsigned HI = (k == S) ? W - 1 : 2 * k;    // last bit added here
    localparam int unsigned R  = W - 1 - HI;                   // bits left for later stages
    // register layout: [HI:0] result bits, [HI+1] carry, then R bits of A1, R bits of A2
    localparam int unsigned RW = (k == S) ? W : HI + 2 + 2 * R;
    localparam int unsigned PR = W - LO;                       // bits left after stage k-1

    dr_t  [RW-1:0] d, q;
    logic [RW-1:0] ack;
    logic          ki;
    localparam int unsigned CL = (k == 1) ? 1 : LO;            // lowest carry used

    dr_t  [W-1:LO]  opa, opb;   // operand bits LO..W-1 seen by this section
    dr_t  [HI+1:CL] ch;         // carry chain, ch[i] is the carry into bit i

    if (k == 1) begin : g_src_in
      assign opa = a1;
      assign opb = a2;
    end else begin : g_src_reg
      localparam int unsigned PHI = LO - 1;
      assign opa = g_st[k-1].q[PHI+2 +: PR];
      assign opb = g_st[k-1].q[PHI+2+PR +: PR];
      assign d[LO-1:0] = g_st[k-1].q[LO-1:0];
      assign ch[LO]    = g_st[k-1].q[LO];
    end

    for (genvar i = LO; i <= HI; i++) begin : g_bit
      if (i == 0) begin : g_ha
        ncl_ha u_ha (.eclk (eclk), .rst (rst), .a (opa[0]), .b (opb[0]), .s (d[0]), .c (ch[1]));
      end else begin : g_fa
        ncl_fa u_fa (.eclk (eclk), .rst (rst), .a (opa[i]), .b (opb[i]), .ci (ch[i]),
                     .s (d[i]), .co (ch[i+1]));
      end
    end

    if (k < S) begin : g_fwd
      assign d[HI+1]            = ch[HI+1];
      assign d[HI+2 +: R]       = opa[W-1:HI+1];
      assign d[HI+2+R +: R]     = opb[W-1:HI+1];
      assign ki                 = done[k+1];
    end else begin : g_out
      assign ki = out_ki;
    end

    ncl_reg  #(.W(RW)) u_reg  (.eclk (eclk), .rst (rst), .d (d), .ki (ki), .q (q), .ko (ack));
    ncl_comp #(.W(RW)) u_comp (.eclk (eclk), .rst (rst), .a (ack), .z (done[k]));
  end

  assign a     = g_st[S].q;
  assign in_ko = done[1];
endmodule
