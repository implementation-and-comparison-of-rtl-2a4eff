// d_latch: level-sensitive D latch with enable.
//
// While en is high the latch is transparent (q follows d); while en is low it
// holds the value d had when en fell. qn is the complement of q. In the
// latch-based carry-select adder en is the clock, so the latch keeps the
// carry-in-1 result computed during the high phase for use in the low phase.
//
// The document draws the latch as a gated set/reset pair (S = D and clock,
// R = not D and clock) driving two cross-coupled gates; this model describes
// the same behaviour at register-transfer level. The latch inferred here is
// intended: it is the storage element of the design, and the lint report of
// a latch for this module is expected. Where the enable is driven by a clock,
// a linter may instead note that it found no latch, having treated the block
// as clocked; the behaviour is the same.
//
// Interface: d, en -> q, qn. Timing: transparent when en = 1, opaque when
// en = 0. No reset: the held value is only read after a high phase of en.
module d_latch (
  input  logic d,
  input  logic en,
  output logic q,
  output logic qn
);
  always_latch begin
    if (en) q = d;
  end

  assign qn = ~q;
endmodule
