// tb_complex_gate: self-checking testbench for the dynamic complex gate.
//
// For all sixteen input combinations, and then 200 random ones, applies the
// inputs, pulses phi2, checks F = AB + CD, then changes the inputs with phi2
// low and checks that F keeps the sampled result.
module tb_complex_gate;

  logic phi2 = 1'b0;
  logic a, b, c, d, f;
  int checks = 0, failures = 0;

  complex_gate dut (.phi2(phi2), .in_a(a), .in_b(b), .in_c(c), .in_d(d), .f(f));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 216; i++) begin
      logic [3:0] v;
      logic ef;
      v  = (i < 16) ? 4'(i) : 4'($urandom);
      {a, b, c, d} = v;
      ef = (v[3] && v[2]) || (v[1] && v[0]);
      #1 phi2 = 1'b1;
      #1 phi2 = 1'b0;
      #1;
      checks++;
      if (f !== ef) begin
        failures++;
        $display("FAIL abcd=%b f=%b", v, f);
      end
      {a, b, c, d} = ~v;
      #1;
      checks++;
      if (f !== ef) begin
        failures++;
        $display("FAIL abcd=%b: f followed inputs outside phi2", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
