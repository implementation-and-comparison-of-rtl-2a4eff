// rca: W-bit ripple-carry adder (RCA).
//
// A chain of W full adders; the carry of bit i feeds bit i+1, so the delay
// grows linearly with W. Every carry-select group uses one of these for its
// carry-in-0 (or, in the latch-based adder, clock-driven) addition.
//
// Interface: a, b (W bits) and carry-in ci give the W-bit sum s and the
// carry-out co. Timing: purely combinational.
// The default width of 4 is that of the RCA blocks drawn for the 16-bit
// linear adder.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign co = c[W];
endmodule
