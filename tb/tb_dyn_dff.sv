// tb_dyn_dff: self-checking testbench for the two-phase master-slave
// flip-flop.
//
// Runs 300 cycles of random input (a cycle is a phi2 pulse then a phi1
// pulse). Checks that q is the input of the previous cycle, one full cycle
// of delay, and that q does not change during the phi2 pulse, so there is
// no path from d to q within one phase.
module tb_dyn_dff;
  import diff_pkg::*;

  logic  phi1 = 1'b0, phi2 = 1'b0;
  diff_t d, q;
  int checks = 0, failures = 0;

  dyn_dff dut (.phi1(phi1), .phi2(phi2), .d(d), .q(q));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    diff_t q_prev;
    for (int t = 0; t < 300; t++) begin
      d = to_diff(1'($urandom));
      q_prev = q;
      #1 phi2 = 1'b1;
      #1 phi2 = 1'b0;
      #1;
      if (t > 0) begin
        checks++;
        if (q !== q_prev) begin
          failures++;
          $display("FAIL cycle %0d: q changed in phi2", t);
        end
      end
      phi1 = 1'b1;
      #1 phi1 = 1'b0;
      #1;
      checks++;
      if (q !== d) begin
        failures++;
        $display("FAIL cycle %0d: q=%b expected %b", t, q, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
