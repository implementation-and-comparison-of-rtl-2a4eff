// csla_bec_group: one M-bit group of the modified (BEC-based) carry-select
// adder.
//
// Instead of two ripple-carry adders, one for each possible carry-in, the
// group has a single M-bit RCA with its carry-in tied to 0. Its (M+1)-bit
// result {carry, sum} goes straight to input 0 of an (M+1)-bit 2:1 mux and,
// through an (M+1)-bit binary to excess-1 converter (BEC), to input 1: adding
// one to the carry-in-0 result gives the carry-in-1 result. The carry out of
// the group below (c_in) selects. This structure is the document's.
//
// Interface: a, b (M bits) and c_in, the carry into the group's lowest bit,
// give s (M bits) and c_out. Timing: combinational; c_in passes through only
// the mux, which is what makes the adder fast.
// The default M = 4 is the group width of the 16-bit linear adder.
module csla_bec_group #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         c_in,
  output logic [M-1:0] s,
  output logic         c_out
);
  logic [M:0] res0;  // {carry, sum} for carry-in 0
  logic [M:0] res1;  // {carry, sum} for carry-in 1

  rca #(.W(M)) u_rca (
    .a (a),
    .b (b),
    .ci(1'b0),
    .s (res0[M-1:0]),
    .co(res0[M])
  );

  bec #(.W(M+1)) u_bec (
    .b(res0),
    .x(res1)
  );

  mux2 #(.W(M+1)) u_mux (
    .d0 (res0),
    .d1 (res1),
    .sel(c_in),
    .y  ({c_out, s})
  );
endmodule
