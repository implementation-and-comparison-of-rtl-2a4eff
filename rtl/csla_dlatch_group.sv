// csla_dlatch_group: one M-bit group of the latch-based carry-select adder.
//
// The group has a single M-bit ripple-carry adder whose carry-in is the clock,
// so it computes both candidate results one after the other:
//   clk high : the RCA adds with carry-in 1; M+1 D-latches, enabled by the
//              clock, are transparent and follow its {carry, sum}.
//   clk low  : the latches hold the carry-in-1 result; the RCA now adds with
//              carry-in 0 and drives input 0 of the mux directly.
// During the low phase the (M+1)-bit 2:1 mux chooses between the live
// carry-in-0 result and the latched carry-in-1 result with the carry out of
// the group below (c_in). A 2-bit group is the document's "group 2": two full
// adders, three latches (two sum bits and the carry) and a 6:3 mux.
//
// Interface: clk, a, b (M bits), c_in -> s (M bits), c_out.
// Timing: a and b must be stable from the rising clock edge until the end of
// the following low phase. s and c_out are valid during the low phase, half a
// clock period after the operands were applied; during the high phase they
// are not meaningful. One addition per clock cycle. The latches are the
// intended storage of this design (see d_latch). The document does not say
// when during the cycle operands may change; this timing is this design's
// reading of its clock-phase description.
module csla_dlatch_group #(
  parameter int unsigned M = 2
) (
  input  logic         clk,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         c_in,
  output logic [M-1:0] s,
  output logic         c_out
);
  logic [M:0] live;    // {carry, sum} of the RCA: carry-in = clk
  logic [M:0] held;    // {carry, sum} stored during the high phase (carry-in 1)

  rca #(.W(M)) u_rca (
    .a (a),
    .b (b),
    .ci(clk),
    .s (live[M-1:0]),
    .co(live[M])
  );

  // The latches' complement outputs are not needed and are left open.
  for (genvar i = 0; i <= M; i++) begin : g_latch
    d_latch u_lat (
      .d (live[i]),
      .en(clk),
      .q (held[i]),
      .qn()
    );
  end

  mux2 #(.W(M+1)) u_mux (
    .d0 (live),
    .d1 (held),
    .sel(c_in),
    .y  ({c_out, s})
  );
endmodule
