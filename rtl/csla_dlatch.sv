// csla_dlatch: latch-based carry-select adder, the document's proposed
// architecture.
//
// A 16-bit section has five groups. Bits 1..0 form a plain 2-bit ripple-carry
// adder on the adder's carry-in. The 14 bits above are four
// csla_dlatch_group blocks of 2, 3, 4 and 5 bits: each has one ripple-carry
// adder whose carry-in is the clock, latches that keep its carry-in-1 result
// from the high clock phase, and a mux that, in the low phase, picks the live
// carry-in-0 or the latched carry-in-1 result with the carry from the group
// below. One adder per group replaces the two adders (or adder plus BEC) of
// the other carry-select adders.
//
// The 2-bit bottom group, the 2-bit second group and the clock-driven upper
// 14 bits are the document's; the 3/4/5 split of the upper groups follows the
// square-root layout (csla_pkg) and is this design's choice. WIDTH above 16
// cascades two half-width adders, as the document does for its other
// adders; that extension is this design's. WIDTH = 8 keeps the 2, 2 and 3 bit
// groups and adds bit 7 with one full adder, as the document describes for
// its 8-bit adders.
//
// Interface: clk, a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
// Timing: apply a, b and cin at a rising clock edge and hold them through the
// following low phase; sum and cout are valid during that low phase and are
// sampled before the next rising edge. One addition per clock cycle. An
// assertion flags operands that change during the low phase.
module csla_dlatch
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  // Operand rule: a, b and cin may change only at a rising edge. Checked for
  // a and b at each rising edge (sampled clk still 0): the operands sampled
  // there must equal those sampled at the preceding falling edge. cin is not
  // checked here: in a cascade the upper half's cin is the lower half's carry
  // out, which only settles during the low phase.
  a_operands_stable : assert property (@(edge clk) !clk |-> $stable({a, b}))
    else $error("csla_dlatch: operands changed during the low clock phase");

  if (WIDTH == SECTION_W || WIDTH == SECTION_W / 2) begin : g_section
    localparam int unsigned NG  = groups_in(GROUP_SQRT, WIDTH);
    localparam int unsigned TOP = group_lsb(GROUP_SQRT, NG);  // bits covered by groups

    logic [NG:0] c;
    assign c[0] = cin;

    for (genvar i = 0; i < NG; i++) begin : g_group
      localparam int unsigned GW  = group_width(GROUP_SQRT, i);
      localparam int unsigned LSB = group_lsb(GROUP_SQRT, i);
      if (i == 0) begin : g_rca
        rca #(.W(GW)) u_rca (
          .a (a[LSB +: GW]),
          .b (b[LSB +: GW]),
          .ci(c[i]),
          .s (sum[LSB +: GW]),
          .co(c[i+1])
        );
      end else begin : g_sel
        csla_dlatch_group #(.M(GW)) u_grp (
          .clk  (clk),
          .a    (a[LSB +: GW]),
          .b    (b[LSB +: GW]),
          .c_in (c[i]),
          .s    (sum[LSB +: GW]),
          .c_out(c[i+1])
        );
      end
    end

    if (TOP < WIDTH) begin : g_tail
      // 8-bit adder: bit 7 is a full adder on the carry out of bits 6..0.
      rca #(.W(WIDTH - TOP)) u_rca (
        .a (a[WIDTH-1:TOP]),
        .b (b[WIDTH-1:TOP]),
        .ci(c[NG]),
        .s (sum[WIDTH-1:TOP]),
        .co(cout)
      );
    end else begin : g_no_tail
      assign cout = c[NG];
    end
  end else if (WIDTH > SECTION_W && WIDTH % (2 * SECTION_W) == 0) begin : g_cascade
    localparam int unsigned HALF = WIDTH / 2;
    logic c_mid;

    csla_dlatch #(.WIDTH(HALF)) u_lo (
      .clk (clk),
      .a   (a[HALF-1:0]),
      .b   (b[HALF-1:0]),
      .cin (cin),
      .sum (sum[HALF-1:0]),
      .cout(c_mid)
    );

    csla_dlatch #(.WIDTH(HALF)) u_hi (
      .clk (clk),
      .a   (a[WIDTH-1:HALF]),
      .b   (b[WIDTH-1:HALF]),
      .cin (c_mid),
      .sum (sum[WIDTH-1:HALF]),
      .cout(cout)
    );
  end else begin : g_bad_width
    $error("csla_dlatch: WIDTH must be 8 or 16 times a power of two");
  end
endmodule
