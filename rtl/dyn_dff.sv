// dyn_dff: two-phase master-slave dynamic D flip-flop, the one-cycle delay
// (the "delta" box) of the bit-systolic arrays.
//
// Two latch_cell stages in series. The master samples the input while phi2
// is active (the first half of a cycle); the slave samples the master while
// phi1 is active (the second half) and then holds it, so data advances one
// stage per full phi2/phi1 cycle. With non-overlapping phases there is never
// a path from d to q within one phase; assertions flag overlapping phases.
//
// Interface: phi1, phi2 (non-overlapping clock phases), d, q (dual-rail).
// Timing: the value on d at the end of a phi2 pulse appears on q at the end
// of the following phi1 pulse and stays there for a whole cycle.
// The master/slave arrangement and the phase assignment follow the document;
// the latch abstraction of the charge-storage nodes is this design's own.
module dyn_dff
  import diff_pkg::*;
(
  input  logic  phi1,
  input  logic  phi2,
  input  diff_t d,
  output diff_t q
);

  diff_t m;

  latch_cell u_master (.phi(phi2), .d(d), .q(m));
  latch_cell u_slave  (.phi(phi1), .d(m), .q(q));

  // The two phases must never be active together: an overlap would make
  // master and slave transparent at once.
  always @(posedge phi1) assert (!phi2) else $error("dyn_dff: phi1 rose while phi2 high");
  always @(posedge phi2) assert (!phi1) else $error("dyn_dff: phi2 rose while phi1 high");

endmodule
