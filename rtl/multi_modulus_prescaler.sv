// multi_modulus_prescaler -- fin / {6, 7, 8, 9, 11, 12} divider built from a
// 3/4 prescaler rippling into a 2/3 prescaler.
//
// fin clocks the divide-by-3/4 cell; its output is the clock of the
// divide-by-2/3 cell, whose output is fout. mc2 sets the 2/3 cell's modulus
// directly. The 3/4 cell's control comes from two NOR gates:
//   g1   = NOR(fout, mc1)
//   mc34 = NOR(g1, mc3)  = ~mc3 & (fout | mc1)
// so the 3/4 cell divides by 3 in each of its cycles where mc34 = 1 and by
// 4 otherwise. One fout period spans P = 2 (mc2 = 1) or 3 (mc2 = 0) cycles
// of the 3/4 cell, and fout is high during exactly one of them:
//   mc3 = 1            every cycle by 4          ratio 4P   (8 or 12)
//   mc3 = 0, mc1 = 1   every cycle by 3          ratio 3P   (6 or 9)
//   mc3 = 0, mc1 = 0   the fout-high cycle by 3  ratio 4P-1 (7 or 11)
//
// The cascade, the use of NOR gates and the control signal names follow the
// described design. Which gate inputs carry which signals is taken from its
// block diagram; the mode polarities of the two cells follow their written
// descriptions. The resulting ratio table is derived from that structure;
// it does not reproduce every mode/ratio pairing quoted for the design (a
// ratio of 13 is out of reach of any 3/4 -> 2/3 cascade, whose longest
// output period is 3 x 4 = 12 input periods).
//
// Interface: rst (pin "In" of the symbol, read as the reset shared by all
// four flip-flops; asynchronous, active high), fin, mc1, mc2, mc3, fout.
// Timing: the 2/3 cell is clocked by the 3/4 cell's output (an asynchronous
// ripple), so fout changes a short delay after a rising edge of fin. The
// mode inputs should be held steady; a new mode takes effect within one
// output period. After reset the first output period may differ from the
// steady ratio.
module multi_modulus_prescaler (
  input  logic rst,
  input  logic fin,
  input  logic mc1,
  input  logic mc2,
  input  logic mc3,
  output logic fout
);

  logic f34;   // output of the 3/4 cell, clock of the 2/3 cell
  logic g1;    // NOR(fout, mc1)
  logic mc34;  // control of the 3/4 cell

  prescaler_3_4 u_p34 (.rst(rst), .fin(fin), .mc(mc34), .fout(f34));
  prescaler_2_3 u_p23 (.rst(rst), .fin(f34), .mc(mc2),  .fout(fout));

  nor2 u_g1 (.a(fout), .b(mc1), .y(g1));
  nor2 u_g2 (.a(g1),   .b(mc3), .y(mc34));

endmodule
