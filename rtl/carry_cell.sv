// carry_cell: differential carry cell of the serial adder.
//
// Inputs are the addend bit a, the partial-product bit p and the stored carry
// c. The carry out is high when at least two of them are high; the
// complement rail is computed the same way from the complement rails, so the
// two rails are produced by mirror-image networks as in the differential
// circuit.
//
// Interface: a, p, c (dual-rail in), y (dual-rail carry out). Timing:
// combinational in this model. Input names and function follow the
// document.
module carry_cell
  import diff_pkg::*;
(
  input  diff_t a,
  input  diff_t p,
  input  diff_t c,
  output diff_t y
);

  always_comb begin
    y.t = (a.t & p.t) | (a.t & c.t) | (p.t & c.t);
    y.f = (a.f & p.f) | (a.f & c.f) | (p.f & c.f);
  end

endmodule
