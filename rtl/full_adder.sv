// full_adder: one-bit full adder, the cell every ripple-carry adder here is
// built from.
//
// Interface: a, b and the carry-in ci give the sum bit s and the carry-out co.
// Timing: purely combinational.
// Sum and carry are the textbook equations s = a ^ b ^ ci and
// co = a&b | ci&(a^b); the gate structure is this design's choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;

  always_comb begin
    p  = a ^ b;
    s  = p ^ ci;
    co = (a & b) | (ci & p);
  end
endmodule
