// complex_gate: dynamic complex logic gate F = AB + CD.
//
// Built, in the circuit, from four basic dynamic switch circuits: each
// samples its input onto a capacitor during phi2 and conducts during
// evaluation when the sampled input is low. A and B switch in parallel,
// C and D in parallel, and the two pairs in series pull the precharged
// output low exactly when F is false. In this model the four inputs are
// stored at the end of the phi2 pulse, as the sampling capacitors are, and F
// is the logic function of the stored values, so F is valid from the end of
// phi2 through the following phi1 evaluation phase and until the next phi2
// pulse ends. Precharge is not modelled.
//
// Interface: phi2 (sampling phase), in_a..in_d, f. The function and the
// sampling phase follow the document; the edge-sampled abstraction is this
// design's own.
module complex_gate (
  input  logic phi2,
  input  logic in_a,
  input  logic in_b,
  input  logic in_c,
  input  logic in_d,
  output logic f
);

  logic [3:0] held;

  always_ff @(negedge phi2) begin
    held <= {in_a, in_b, in_c, in_d};
  end

  assign f = (held[3] & held[2]) | (held[1] & held[0]);

endmodule
