// sp_mac: bit-systolic serial-parallel multiply-accumulator.
//
// Computes p = a + x * y for an N-bit unsigned multiplier x entered serially,
// an N-bit unsigned multiplicand y applied in parallel, and a 2N-bit addend a
// entered serially; p leaves serially, least significant bit first, as a
// 2N-bit word. N sp_bit_cells are chained: the multiplier moves through one
// delay per cell, the product stream through two. Every combinational path
// computes a single bit, so the word length can grow without slowing the
// clock. The array stores N multiplier bits and 2N product bits, which lets
// p be fed back to a to accumulate a product sum in 2N cycles per product.
//
// Interface (single-ended at this boundary, dual-rail inside):
//   phi1, phi2  non-overlapping clock phases; one cycle is a phi2 pulse
//               followed by a phi1 pulse. Inputs change between phi1 and
//               the next phi2.
//   x           multiplier, LSB first: N bits, then N zeros (one word every
//               2N cycles).
//   y[N-1:0]    multiplicand; it may change only in the cycle just before a
//               word's first multiplier bit.
//   a           addend, LSB first, 2N bits (timing below).
//   p           product-sum output, LSB first.
//   x_out       the multiplier, delayed N cycles, for a following module.
//   acc_tap     the first product stage of every cell (a<k>), for checking.
//   rail_err    some stored dual-rail bit has equal rails.
// Timing, with multiplier bit 0 on x in cycle s: addend bit w must be on a in
// cycle s + w - N + 1; cell k forms bit w of its partial sum in cycle
// s + N - 1 + w - 2k (so cell 0 forms the product LSB N cycles into the
// sequence, counting cycle s as the first) and shows it on acc_tap[k] in the
// next cycle; product bit w is on p in cycle s + N + 1 + w. From a to p is
// exactly 2N cycles. A carry out of the
// most significant bit is not cleared and lands in the next word's LSB, so
// a + x * y must stay below 2**(2N). The structure and cycle schedule follow
// the document's figure and operation tables; port names are this design's.
module sp_mac
  import diff_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic         phi1,
  input  logic         phi2,
  input  logic         x,
  input  logic [N-1:0] y,
  input  logic         a,
  output logic         p,
  output logic         x_out,
  output logic [N-1:0] acc_tap,
  output logic         rail_err
);

  // Stage N-1 is the left end of the array, where x and a enter.
  diff_t [N:0] xs;    // xs[k+1] feeds cell k; xs[0] leaves the array
  diff_t [N:0] as;    // as[k+1] feeds cell k; as[0] is the product output
  diff_t [N-1:0] acc;
  logic  [N-1:0] err;

  assign xs[N] = to_diff(x);
  assign as[N] = to_diff(a);

  for (genvar k = 0; k < N; k++) begin : g_cell
    sp_bit_cell u_cell (
      .phi1    (phi1),
      .phi2    (phi2),
      .x_in    (xs[k+1]),
      .y       (to_diff(y[k])),
      .a_in    (as[k+1]),
      .x_out   (xs[k]),
      .acc     (acc[k]),
      .s_out   (as[k]),
      .rail_err(err[k])
    );
    assign acc_tap[k] = acc[k].t;
  end

  assign p        = as[0].t;
  assign x_out    = xs[0].t;
  assign rail_err = |err;

endmodule
