// nor2 -- two-input NOR gate.
//
// The prescalers are built from flip-flops and two-input NOR gates only. In
// silicon the gate is the static CMOS NOR (two series PMOS, two parallel
// NMOS), chosen over NMOS and pseudo-NMOS NOR gates because those draw static
// current. Here it is its logic function: y = ~(a | b), with no delay.
module nor2 (
  input  logic a,
  input  logic b,
  output logic y
);

  assign y = ~(a | b);

endmodule
