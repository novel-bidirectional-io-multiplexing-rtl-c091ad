// domino_stage: behavioural model of one dynamic CMOS gate of the dynamic
// IO multiplexing circuit (one precharged node with CLK-driven precharge
// PMOS and footer NMOS, a keeper PMOS and an output inverter).
//
// This is a behavioural model of a transistor-level circuit, not standard-
// cell logic. The precharged node is state, so it is written as a latch:
//   CLK = 0 (precharge): the node is pulled high and the output y is 0.
//   CLK = 1 (evaluate) : if the pull-down network conducts (pdn_on = 1), the
//                        node discharges and y goes to 1. Once discharged it
//                        stays low until the next precharge, even if pdn_on
//                        falls again. While the network is off, the keeper
//                        holds the node high.
// So y = 1 exactly when pdn_on has been 1 at some point of the current
// evaluate phase. A well-formed domino input (monotonic during evaluate)
// gives y = clk & pdn_on. The latch that tools report here is this
// precharged node, and it is intended.
//
// The gate structure (clocked precharge and footer, keeper, output inverter)
// follows the published dynamic circuit. Modelling the node as a latch with
// zero delay is this model's own choice; it says nothing about charge
// sharing, which the keeper exists to counter.
//
// Interface: clk, pdn_on (the logic function of the pull-down network),
// y (inverter output). No delays are modelled.
module domino_stage (
  input  logic clk,
  input  logic pdn_on,
  output logic y
);

  logic node_high;  // state of the precharged dynamic node

  always_latch begin
    if (!clk)        node_high = 1'b1;  // precharge
    else if (pdn_on) node_high = 1'b0;  // evaluate: discharge through PDN and footer
  end

  assign y = ~node_high;

endmodule
