// xor_cell: differential XOR cell of the serial adder.
//
// Each output rail is computed from the true-form rails of a and b, as the
// two pull-down networks of the differential circuit do, so out.t is a XOR b
// and out.f its complement without any inverter. Two of these cells form the
// sum bit of the serial adder.
//
// Interface: a, b (dual-rail in), y (dual-rail out). Timing: combinational in
// this model; the clock phase that samples the inputs of the dynamic circuit
// is carried by the delay elements around it. The function and the
// differential form follow the document.
module xor_cell
  import diff_pkg::*;
(
  input  diff_t a,
  input  diff_t b,
  output diff_t y
);

  always_comb begin
    y.t = (a.t & b.f) | (a.f & b.t);
    y.f = (a.t & b.t) | (a.f & b.f);
  end

endmodule
