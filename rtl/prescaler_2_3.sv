// prescaler_2_3 -- dual-modulus divide-by-2/3 prescaler.
//
// Two flip-flops clocked by fin and two NOR gates:
//   n1  = NOR(q1, mc)        first gate: first flip-flop output and mc
//   d2  = NOR(n1, fout)      second gate: first gate and the output
//   d1  = ~fout              first flip-flop takes the output's complement
//   fout = q2                second flip-flop drives the output
// With mc = 1 the first gate is held at 0, so the second flip-flop toggles
// and fout = fin / 2. With mc = 0, d2 = q1 & ~q2 and the pair walks
// (q1,q2) = 00 -> 10 -> 11 -> 00, so fout = fin / 3, high for one fin
// period of three.
//
// Interface: rst (the pin marked "in" on the cell symbol, read here as the
// reset shared by both flip-flops), fin, mc, fout.
// Timing: fout changes on rising edges of fin only. mc matters only at the
// rising edge of fin where both flip-flops hold 0 (the edge that starts an
// output pulse): mc = 1 then ends the cycle after two fin periods, mc = 0
// after three. rst is asynchronous and active high and clears both
// flip-flops (fout = 0).
// The gate network follows the cell's block diagram; the reading of "in"
// as the reset and the reset polarity are this design's choices.
module prescaler_2_3 (
  input  logic rst,
  input  logic fin,
  input  logic mc,
  output logic fout
);

  logic q1;
  logic q1b_unused;  // the first flip-flop's complement output is not used
  logic q2, q2b;
  logic n1, d2;

  tspc_dff u_dff1 (.clk(fin), .rst(rst), .d(q2b), .q(q1), .qbar(q1b_unused));
  nor2     u_nor1 (.a(q1), .b(mc), .y(n1));
  nor2     u_nor2 (.a(n1), .b(q2), .y(d2));
  tspc_dff u_dff2 (.clk(fin), .rst(rst), .d(d2), .q(q2), .qbar(q2b));

  assign fout = q2;

endmodule
