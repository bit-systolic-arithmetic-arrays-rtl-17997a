// sp_bit_cell: one bit-cell of the bit-systolic serial-parallel multiplier.
//
// A cell owns one bit y of the parallel multiplicand. The serial multiplier
// bit arriving on x_in is multiplied by y in a product_cell and added, in a
// serial_adder, to the product stream arriving from the previous cell on
// a_in. The sum is stored in the first of two dyn_dff stages (acc, the
// "a<k>" node) and delayed once more before it leaves on s_out. The
// multiplier bit itself is delayed by one dyn_dff on its way to the next
// cell. Because the product stream moves two stages per cell and the
// multiplier one, each cell sees the partial sum exactly one place higher
// than the cell before, which aligns y_k with weight 2^k.
//
// Interface: phi1, phi2 (clock phases); x_in, y, a_in (dual-rail in);
// x_out (multiplier, one cycle later), acc (first product stage),
// s_out (second product stage), rail_err (a stored bit has equal rails).
// Timing: acc holds, one cycle after they are presented, the sum of a_in,
// x_in & y and the cell's carry; s_out holds acc one cycle later. The
// structure follows the document's figure of the multiplier; the rail check
// is this design's own.
module sp_bit_cell
  import diff_pkg::*;
(
  input  logic  phi1,
  input  logic  phi2,
  input  diff_t x_in,
  input  diff_t y,
  input  diff_t a_in,
  output diff_t x_out,
  output diff_t acc,
  output diff_t s_out,
  output logic  rail_err
);

  diff_t pp;
  diff_t sum;
  diff_t carry;

  product_cell u_prod (.a(x_in), .b(y), .y(pp));
  serial_adder u_add  (.phi1(phi1), .phi2(phi2), .a(a_in), .p(pp), .s(sum), .c(carry));
  dyn_dff      u_acc  (.phi1(phi1), .phi2(phi2), .d(sum), .q(acc));
  dyn_dff      u_dly  (.phi1(phi1), .phi2(phi2), .d(acc), .q(s_out));
  dyn_dff      u_xdly (.phi1(phi1), .phi2(phi2), .d(x_in), .q(x_out));

  assign rail_err = !diff_valid(x_out) || !diff_valid(acc) ||
                    !diff_valid(s_out) || !diff_valid(carry);

endmodule
