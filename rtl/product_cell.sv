// product_cell: differential partial-product cell.
//
// Forms the one-bit product of a multiplier bit a and a multiplicand bit b:
// the true rail is high only when both true rails are high, the complement
// rail when either complement rail is high. In the multiplier it multiplies
// the passing serial multiplier bit by the stage's parallel multiplicand bit.
//
// Interface: a, b (dual-rail in), y (dual-rail out). Timing: combinational
// in this model. The cell and its role follow the document.
module product_cell
  import diff_pkg::*;
(
  input  diff_t a,
  input  diff_t b,
  output diff_t y
);

  always_comb begin
    y.t = a.t & b.t;
    y.f = a.f | b.f;
  end

endmodule
