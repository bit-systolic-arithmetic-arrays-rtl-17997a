// tb_carry_cell: exhaustive self-checking testbench for the differential
// carry cell.
//
// Applies all eight valid combinations of a, p and c and checks that the
// true rail is high when at least two inputs are high (the carry of a full
// adder, counted independently of the cell's equations) and that the
// complement rail is its inverse. It then drives all rails low and checks
// that neither output rail rises.
module tb_carry_cell;
  import diff_pkg::*;

  diff_t a, p, c, y;
  int checks = 0, failures = 0;

  carry_cell dut (.a(a), .p(p), .c(c), .y(y));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [2:0] v;
      logic ey;
      v  = 3'(i);
      a  = to_diff(v[2]);
      p  = to_diff(v[1]);
      c  = to_diff(v[0]);
      ey = (int'(v[2]) + int'(v[1]) + int'(v[0])) >= 2;
      #1;
      checks++;
      if (y.t !== ey || y.f !== ~ey) begin
        failures++;
        $display("FAIL a,p,c=%b y=%b", v, y);
      end
    end
    a = '0; p = '0; c = '0;
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
