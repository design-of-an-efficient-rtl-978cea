// prescaler_3_4 -- dual-modulus divide-by-3/4 prescaler.
//
// Two flip-flops clocked by fin and two NOR gates:
//   n1   = NOR(q2b, ~mc)     first gate: output complement and the control
//   d2   = NOR(n1, q1b)      second gate: first gate and ~q1
//   d1   = q2b               first flip-flop takes the output's complement
//   fout = q2
// With mc = 0 the first gate is held at 0, d2 = q1, and the two flip-flops
// form a twisted ring: (q1,q2) = 00 -> 10 -> 11 -> 01 -> 00, fout = fin / 4
// with a 50 % duty cycle. With mc = 1 the first gate passes q2, so
// d2 = q1 & ~q2 and the state 01 is skipped: 00 -> 10 -> 11 -> 00,
// fout = fin / 3, high for one fin period of three.
//
// The flip-flop and gate connections follow the cell's block diagram, and
// the mode polarity (mc = 1 divides by 3, mc = 0 by 4) follows the cell's
// written description. Wired literally, the diagram gives the opposite
// polarity; this design keeps the stated polarity and puts the inversion on
// the control input of the first gate (~mc), which is its own choice.
//
// Interface: rst (the pin marked "In" on the cell symbol, read here as the
// reset shared by both flip-flops), fin, mc, fout.
// Timing: fout changes on rising edges of fin only; mc is sampled at the
// rising edge of fin where the ring is in state 11, so it selects the
// length of the current output cycle if it is stable by then. rst is
// asynchronous, active high, and clears both flip-flops (fout = 0).
module prescaler_3_4 (
  input  logic rst,
  input  logic fin,
  input  logic mc,
  output logic fout
);

  logic q1b;
  logic q1_unused;   // the first flip-flop's true output is not used
  logic q2, q2b;
  logic n1, d2;

  tspc_dff u_dff1 (.clk(fin), .rst(rst), .d(q2b), .q(q1_unused), .qbar(q1b));
  nor2     u_nor1 (.a(q2b), .b(~mc), .y(n1));
  nor2     u_nor2 (.a(n1), .b(q1b), .y(d2));
  tspc_dff u_dff2 (.clk(fin), .rst(rst), .d(d2), .q(q2), .qbar(q2b));

  assign fout = q2;

endmodule
