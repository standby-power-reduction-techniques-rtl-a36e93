// ncl_gate: the state-holding core shared by every NCL threshold gate.
//
// An NCL gate has a "set" network that asserts the output, a "reset" network
// that de-asserts it only when every input is de-asserted, and hold networks
// that keep the previous output otherwise (hysteresis). This module is that
// structure with the set and reset conditions supplied as Boolean inputs by
// the gate that instantiates it (ncl_thmn, ncl_th22_asym, the dual-rail AND,
// half adder and zero generator).
//
// Timing model (this design's choice): the asynchronous circuit is emulated
// with a unit gate delay. Every gate re-evaluates on each rising edge of the
// evaluation clock eclk, so a gate's output follows its inputs one eclk
// period later. eclk is not a clock of the design: the circuit is
// quasi-delay-insensitive, so its results do not depend on which delay each
// gate has, and the unit delay is only a way to simulate and synthesise it
// without combinational loops. rst is an asynchronous, active-high
// initialisation input that forces the output to RST_VAL; in silicon only the
// register gates carry it, here every gate does so that a two-state
// simulation starts from the documented standby state.
module ncl_gate #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic eclk,
  input  logic rst,
  input  logic set,   // set network conducts: output becomes 1
  input  logic clr,   // reset network conducts (all inputs de-asserted): output becomes 0
  output logic z
);
  always_ff @(posedge eclk or posedge rst) begin
    if (rst)      z <= RST_VAL;
    else if (set) z <= 1'b1;
    else if (clr) z <= 1'b0;
  end
endmodule
