// csla_top: the carry-select adders of this design side by side.
//
// All three adders see the same operands and carry-in and produce the same
// sum by different means:
//   sqrt   : modified (BEC) carry-select adder, square-root grouping
//            2/2/3/4/5 - the document's lowest-area combinational adder;
//   linear : modified (BEC) carry-select adder, four 4-bit groups;
//   dlatch : the proposed latch-based carry-select adder, one ripple-carry
//            adder per group used twice per clock cycle.
// Each result is brought out on its own port so the architectures can be
// compared and checked against each other.
//
// Interface: clk (used only by the latch-based adder), a, b (WIDTH bits),
// cin -> sum_* (WIDTH bits), cout_*.
// Timing: sum_sqrt and sum_linear are combinational. sum_dlatch is valid in
// the low phase of clk when a, b and cin were applied at the preceding rising
// edge and held (see csla_dlatch).
module csla_top
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum_sqrt,
  output logic             cout_sqrt,
  output logic [WIDTH-1:0] sum_linear,
  output logic             cout_linear,
  output logic [WIDTH-1:0] sum_dlatch,
  output logic             cout_dlatch
);
  csla_modified #(.WIDTH(WIDTH), .GROUPING(GROUP_SQRT)) u_sqrt (
    .a   (a),
    .b   (b),
    .cin (cin),
    .sum (sum_sqrt),
    .cout(cout_sqrt)
  );

  csla_modified #(.WIDTH(WIDTH), .GROUPING(GROUP_LINEAR)) u_linear (
    .a   (a),
    .b   (b),
    .cin (cin),
    .sum (sum_linear),
    .cout(cout_linear)
  );

  csla_dlatch #(.WIDTH(WIDTH)) u_dlatch (
    .clk (clk),
    .a   (a),
    .b   (b),
    .cin (cin),
    .sum (sum_dlatch),
    .cout(cout_dlatch)
  );
endmodule
