// bec: W-bit binary to excess-1 converter (BEC).
//
// Adds one to its input, modulo 2**W. In the modified carry-select adder a
// (W)-bit BEC fed with the {carry, sum} of a (W-1)-bit carry-in-0 RCA yields
// the carry-in-1 result, replacing a second RCA with fewer gates.
//
// How it works: bit 0 is inverted, and bit i flips exactly when all bits
// below it are one: x[i] = b[i] ^ (b[0] & ... & b[i-1]). The running AND is
// built as a chain, one AND gate per bit. The add-one function is the
// document's; the AND-chain structure is this design's choice.
//
// Interface: b (W bits) in, x = b + 1 (W bits) out. Timing: combinational.
// The default of 5 bits is the BEC width drawn for a 4-bit group.
module bec #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] x
);
  // all_ones_below[i] = b[0] & ... & b[i-1]; all_ones_below[0] = 1.
  logic [W-1:0] all_ones_below;

  assign all_ones_below[0] = 1'b1;
  for (genvar i = 1; i < W; i++) begin : g_and
    assign all_ones_below[i] = all_ones_below[i-1] & b[i-1];
  end

  assign x = b ^ all_ones_below;
endmodule
