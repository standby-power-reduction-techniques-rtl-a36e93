// ncl_mac: unsigned 32 + 16x16 multiply-and-accumulate unit in dual-rail
// NULL Convention Logic, with indeterminate standby states reduced.
//
// Each operation takes a pair of unsigned 16-bit operands X, Y and produces
// the 32-bit accumulator value A(n) = A(n-1) + X*Y (mod 2^32), with A(0) = 0
// after reset. Three parts, as in the document:
//   ncl_pp_tree  - 7-stage partial-product generation and Wallace tree, ending
//                  in REG3 with the product in carry-save form (PP1, PP2);
//   ncl_mac_loop - the 4-register accumulator feedback loop with the U0/U1
//                  gating that parks the accumulator in REG2 during standby;
//   ncl_rca_pipe - the 15-stage pipelined 30-bit ripple-carry adder that turns
//                  the carry-save accumulator into the binary result.
// Everything is asynchronous NCL with four-phase full-word handshakes: the
// producer presents X,Y as DATA when ko = 1 and NULL when ko = 0; the result
// register shows A as DATA and then NULL, moving on when ki = 1 (request for
// DATA) or ki = 0 (request for NULL). In standby all inputs are NULL and the
// whole pipeline settles to NULL except REG2.
//
// eclk is the unit-delay evaluation clock of the simulation model (see
// ncl_gate), not a clock of the design; rst initialises every gate.
// The status outputs reg0_ki and comp0 expose the two loop signals the
// reduction technique is about, for observation only.
module ncl_mac #(
  parameter int unsigned N = 16,        // operand width
  parameter int unsigned W = 2 * N      // accumulator width
) (
  input  logic                 eclk,
  input  logic                 rst,
  input  ncl_pkg::dr_t [N-1:0] x,
  input  ncl_pkg::dr_t [N-1:0] y,
  output logic                 ko,
  output ncl_pkg::dr_t [W-1:0] a,
  input  logic                 ki,
  output logic                 reg0_ki,
  output logic                 comp0
);
  import ncl_pkg::*;

  initial begin
    assert (W == 2 * N) else $error("ncl_mac: accumulator must be twice the operand width");
  end

  dr_t [W-1:0] pp1, pp2, a1, a2;
  logic        pp_ki, pp_ko, rca_ko;

  ncl_pp_tree #(.N(N)) u_pp (
    .eclk (eclk), .rst (rst), .x (x), .y (y), .in_ko (ko),
    .pp1 (pp1), .pp2 (pp2), .pp_ki (pp_ki), .pp_ko (pp_ko));

  ncl_mac_loop #(.W(W)) u_loop (
    .eclk (eclk), .rst (rst), .pp1 (pp1), .pp2 (pp2), .pp_ko (pp_ko), .reg3_ki (pp_ki),
    .a1 (a1), .a2 (a2), .out_ki (rca_ko), .reg0_ki (reg0_ki), .comp0 (comp0));

  ncl_rca_pipe #(.W(W)) u_rca (
    .eclk (eclk), .rst (rst), .a1 (a1), .a2 (a2), .in_ko (rca_ko), .a (a), .out_ki (ki));
endmodule
