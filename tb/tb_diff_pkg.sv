// tb_diff_pkg: checks the dual-rail helpers of diff_pkg.
//
// to_diff must drive the true rail with the bit and the complement rail
// with its inverse; diff_valid must accept exactly the two rail pairs whose
// rails differ.
module tb_diff_pkg;
  import diff_pkg::*;

  int checks = 0, failures = 0;

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    diff_t d;
    for (int b = 0; b < 2; b++) begin
      d = to_diff(1'(b));
      checks++;
      if (d.t !== 1'(b) || d.f !== ~1'(b)) begin
        failures++;
        $display("FAIL to_diff(%0d) = %b", b, d);
      end
    end
    for (int i = 0; i < 4; i++) begin
      d = 2'(i);
      checks++;
      if (diff_valid(d) !== (i == 1 || i == 2)) begin
        failures++;
        $display("FAIL diff_valid(%b)", d);
      end
    end
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
