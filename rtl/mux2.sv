// mux2: W-bit 2:1 multiplexer.
//
// Picks the carry-in-0 result d0 when sel is 0 and the carry-in-1 result d1
// when sel is 1; sel is the carry coming out of the group below. A "10:5"
// multiplexer of the 4-bit group is this module with W = 5 (four sum bits
// plus the carry), a "6:3" one W = 3.
//
// The word-wide 2:1 selection is the document's; the default width of 5 is
// that of its 4-bit groups. Which input value 1 picks is this design's choice.
//
// Interface: d0, d1 (W bits), sel -> y. Timing: combinational.
module mux2 #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         sel,
  output logic [W-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
