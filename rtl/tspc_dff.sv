// tspc_dff -- positive-edge-triggered D flip-flop with reset.
//
// In the prescaler this is a true single-phase clock (TSPC) dynamic
// flip-flop: one clock phase, the state held on internal node capacitance,
// and a reset that discharges an internal node. At the logic level it is an
// ordinary edge-triggered D flip-flop, which is what this module describes;
// the dynamic storage (and its failure at very low clock rates through
// leakage) is a property of the transistor circuit and is not modelled.
//
// Interface: d, clk, q and qbar as in the transistor schematic; rst is the
// reset the prescaler adds to the TSPC cell.
// Timing: q takes d on each rising edge of clk; qbar is always the
// complement of q. The reset is asynchronous and active high and forces
// q = 0 (qbar = 1); its polarity, its asynchronous action and the value it
// forces are this design's choices, since only its existence is specified.
module tspc_dff (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q,
  output logic qbar
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= d;
  end

  assign qbar = ~q;

endmodule
