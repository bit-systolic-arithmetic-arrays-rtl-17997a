// tb_latch_cell: self-checking testbench for the dynamic latch.
//
// Drives random dual-rail values, including invalid rail pairs, and pulses
// phi, changing d during the pulse. Checks that q takes the value d had at
// the end of the pulse, that q
// does not change while d changes with phi low, and that both rails are
// stored independently.
module tb_latch_cell;
  import diff_pkg::*;

  logic  phi = 1'b0;
  diff_t d, q;
  int checks = 0, failures = 0;

  latch_cell dut (.phi(phi), .d(d), .q(q));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    diff_t held;
    for (int i = 0; i < 200; i++) begin
      d = 2'($urandom);
      #1 phi = 1'b1;
      #1 d = 2'($urandom);     // value present when the pulse ends
      #1 phi = 1'b0;
      held = d;
      #1;
      checks++;
      if (q !== held) begin
        failures++;
        $display("FAIL step %0d: q=%b expected %b", i, q, held);
      end
      d = ~held;               // change the input with phi low
      #1;
      checks++;
      if (q !== held) begin
        failures++;
        $display("FAIL step %0d: q followed d with phi low", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
