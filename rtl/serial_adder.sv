// serial_adder: bit-serial full adder (the Sigma_s box of the multiplier).
//
// Adds two serial streams, least significant bit first. Two xor_cells form
// the sum a ^ p ^ c, a carry_cell forms the carry, and a dyn_dff holds the
// carry for one cycle so it is added to the next, one place higher, pair of
// bits. A bit-serial adder needs exactly one bit of combinational work per
// cycle, which is what keeps the array bit-systolic.
//
// Interface: phi1, phi2 (clock phases), a (addend stream), p (partial-product
// stream), s (sum, combinational from a, p and the stored carry), c (the
// stored carry, exposed for rail checking).
// Timing: s is valid in the same cycle as a and p; the carry of that cycle
// is applied in the next. There is no carry clear: a carry out of the most
// significant bit of a word enters the least significant bit of the next
// word, so the sums a stream carries must fit in its word length. The cell
// types follow the document; the way they are wired is this design's own.
module serial_adder
  import diff_pkg::*;
(
  input  logic  phi1,
  input  logic  phi2,
  input  diff_t a,
  input  diff_t p,
  output diff_t s,
  output diff_t c
);

  diff_t ap;
  diff_t cy;

  xor_cell   u_xor_ap  (.a(a),  .b(p), .y(ap));
  xor_cell   u_xor_sum (.a(ap), .b(c), .y(s));
  carry_cell u_carry   (.a(a), .p(p), .c(c), .y(cy));
  dyn_dff    u_cstore  (.phi1(phi1), .phi2(phi2), .d(cy), .q(c));

endmodule
