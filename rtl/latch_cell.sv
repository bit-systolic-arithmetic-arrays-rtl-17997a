// latch_cell: differential dynamic latch, the storage half-stage of the
// bit-systolic cells.
//
// The circuit samples the input rails onto coupling capacitors while its
// sampling clock phase is active and drives the stored value on the output
// rails once that phase ends; the clocked precharge makes it ratioless and
// free of DC current. What the circuit keeps is the charge left on the
// capacitor when the sampling switch opens, so the model stores the input as
// it stands at the falling edge of `phi`. Both rails are stored
// independently, as in the two identical halves of the circuit, so a rail
// fault passes through unchanged and can be detected downstream.
//
// Interface: phi (the sampling phase), d (dual-rail in), q (dual-rail out).
// Timing: q takes the value of d at the end of each phi pulse and holds it
// until the end of the next. The latch and its two-phase use come from the
// document; storing on the phase's closing edge instead of following the
// input during the phase is this design's abstraction, and precharge and
// charge decay are not modelled.
module latch_cell
  import diff_pkg::*;
(
  input  logic  phi,
  input  diff_t d,
  output diff_t q
);

  always_ff @(negedge phi) begin
    q <= d;
  end

endmodule
