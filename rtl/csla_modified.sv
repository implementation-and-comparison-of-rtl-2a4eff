// csla_modified: modified carry-select adder, with binary to excess-1
// converters (BEC) in place of the carry-in-1 ripple-carry adders.
//
// A 16-bit section is cut into groups (see csla_pkg). The lowest group is a
// ripple-carry adder on the adder's carry-in. Each higher group is a
// csla_bec_group: it forms its carry-in-0 result with an RCA and its
// carry-in-1 result with a BEC, and the carry out of the group below picks
// one. The carry therefore passes through one mux per group instead of
// rippling through every bit.
//
// GROUPING = GROUP_SQRT gives the square-root adder with groups of 2, 2, 3, 4
// and 5 bits, the layout the document favours for area; GROUP_LINEAR gives
// four 4-bit groups. A WIDTH above 16 is built, as in the document, by
// cascading two adders of half the width, the carry out of the lower feeding
// the carry-in of the upper, down to 16-bit sections. WIDTH must be 16 times
// a power of two, or 8. The 8-bit adder, as in the document, is the 16-bit
// layout without its top groups: with square-root grouping it has groups of
// 2, 2 and 3 bits and a single full adder for bit 7.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
// Timing: purely combinational.
module csla_modified
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH    = 16,
  parameter grouping_e   GROUPING = GROUP_SQRT
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  if (WIDTH == SECTION_W || WIDTH == SECTION_W / 2) begin : g_section
    localparam int unsigned NG  = groups_in(GROUPING, WIDTH);
    localparam int unsigned TOP = group_lsb(GROUPING, NG);  // bits covered by groups

    // c[i] is the carry into group i; c[NG] is the carry out.
    logic [NG:0] c;
    assign c[0] = cin;

    for (genvar i = 0; i < NG; i++) begin : g_group
      localparam int unsigned GW  = group_width(GROUPING, i);
      localparam int unsigned LSB = group_lsb(GROUPING, i);
      if (i == 0) begin : g_rca
        rca #(.W(GW)) u_rca (
          .a (a[LSB +: GW]),
          .b (b[LSB +: GW]),
          .ci(c[i]),
          .s (sum[LSB +: GW]),
          .co(c[i+1])
        );
      end else begin : g_sel
        csla_bec_group #(.M(GW)) u_grp (
          .a    (a[LSB +: GW]),
          .b    (b[LSB +: GW]),
          .c_in (c[i]),
          .s    (sum[LSB +: GW]),
          .c_out(c[i+1])
        );
      end
    end

    if (TOP < WIDTH) begin : g_tail
      // 8-bit adder: the bit(s) above the last whole group ripple on its carry.
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

    csla_modified #(.WIDTH(HALF), .GROUPING(GROUPING)) u_lo (
      .a   (a[HALF-1:0]),
      .b   (b[HALF-1:0]),
      .cin (cin),
      .sum (sum[HALF-1:0]),
      .cout(c_mid)
    );

    csla_modified #(.WIDTH(HALF), .GROUPING(GROUPING)) u_hi (
      .a   (a[WIDTH-1:HALF]),
      .b   (b[WIDTH-1:HALF]),
      .cin (c_mid),
      .sum (sum[WIDTH-1:HALF]),
      .cout(cout)
    );
  end else begin : g_bad_width
    $error("csla_modified: WIDTH must be 8 or 16 times a power of two");
  end
endmodule
