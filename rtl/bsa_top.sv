// bsa_top: bit-systolic multiply-accumulator with product-sum feedback, and
// the dynamic complex gate alongside it.
//
// The multiply-accumulator (sp_mac) takes its addend either from the a_ext
// input or, when acc_en is high, from its own output p. Because the path
// from addend input to output is exactly 2N cycles, the fed-back word lines
// up with the next multiplication, so a stream of multipliers x_i against
// multiplicands y_i accumulates sum(x_i * y_i) with no extra adder: one
// product every 2N cycles. The complex gate F = AB + CD is the document's
// example of a multi-input dynamic gate; it stands beside the arithmetic
// with its own ports and shares only the phi2 phase.
//
// Interface: phi1, phi2 (non-overlapping clock phases), x, y, a_ext, acc_en,
// p, x_out, rail_err (see sp_mac for the word timing); gate_a..gate_d, gate_f.
// acc_en selects the addend source combinationally and may change only at a
// word boundary. The feedback follows the document; the select input is this
// design's own.
module bsa_top #(
  parameter int unsigned N = 4
) (
  input  logic         phi1,
  input  logic         phi2,
  input  logic         x,
  input  logic [N-1:0] y,
  input  logic         a_ext,
  input  logic         acc_en,
  output logic         p,
  output logic         x_out,
  output logic [N-1:0] acc_tap,
  output logic         rail_err,
  input  logic         gate_a,
  input  logic         gate_b,
  input  logic         gate_c,
  input  logic         gate_d,
  output logic         gate_f
);

  logic a_sel;

  assign a_sel = acc_en ? p : a_ext;

  sp_mac #(.N(N)) u_mac (
    .phi1    (phi1),
    .phi2    (phi2),
    .x       (x),
    .y       (y),
    .a       (a_sel),
    .p       (p),
    .x_out   (x_out),
    .acc_tap (acc_tap),
    .rail_err(rail_err)
  );

  complex_gate u_gate (
    .phi2(phi2),
    .in_a(gate_a),
    .in_b(gate_b),
    .in_c(gate_c),
    .in_d(gate_d),
    .f   (gate_f)
  );

endmodule
