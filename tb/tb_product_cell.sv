// tb_product_cell: exhaustive self-checking testbench for the differential product_cell.
//
// Applies every valid dual-rail combination of the two inputs and checks
// that the true rail equals the product a AND b and the complement rail its inverse.
// It then drives both inputs with both rails low (the state of a
// discharged pair) and checks that neither output rail rises, which shows
// that each rail is computed only from the true-form input rails.
module tb_product_cell;
  import diff_pkg::*;

  diff_t a, b, y;
  int checks = 0, failures = 0;

  product_cell dut (.a(a), .b(b), .y(y));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      logic ea, eb, ey;
      {ea, eb} = 2'(i);
      a = to_diff(ea);
      b = to_diff(eb);
      ey = ea & eb;
      #1;
      checks++;
      if (y.t !== ey || y.f !== ~ey) begin
        failures++;
        $display("FAIL a=%0b b=%0b y=%b", ea, eb, y);
      end
    end
    a = '0;
    b = '0;
    #1;
    checks++;
    if (y !== '0) begin
      failures++;
      $display("FAIL discharged inputs gave y=%b", y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
