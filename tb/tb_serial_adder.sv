// tb_serial_adder: self-checking testbench for the bit-serial adder.
//
// Feeds 40 pairs of random 8-bit words, least significant bit first, back
// to back. The expected sum bits come from integer addition of each word
// pair plus the carry left over from the previous pair (the adder has no
// carry clear, so a carry out of a word enters the next). The sum is
// checked in the same cycle as its inputs, and the stored carry rails are
// checked to be complementary.
module tb_serial_adder;
  import diff_pkg::*;

  localparam int L = 8;
  localparam int W = 40;

  logic  phi1 = 1'b0, phi2 = 1'b0;
  diff_t a, p, s, c;
  int checks = 0, failures = 0;

  serial_adder dut (.phi1(phi1), .phi2(phi2), .a(a), .p(p), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle();
    #1 phi2 = 1'b1;
    #1 phi2 = 1'b0;
    #1 phi1 = 1'b1;
    #1 phi1 = 1'b0;
    #1;
  endtask

  initial begin
    int unsigned cin;
    cin = 0;
    // clear the stored carry: zeros until it has been added once
    a = to_diff(1'b0);
    p = to_diff(1'b0);
    repeat (2) cycle();
    for (int j = 0; j < W; j++) begin
      int unsigned aw, pw, sw;
      aw = $urandom_range(0, (1 << L) - 1);
      pw = $urandom_range(0, (1 << L) - 1);
      if (j == 1) begin aw = (1 << L) - 1; pw = 1; end   // full carry ripple
      sw = aw + pw + cin;
      for (int w = 0; w < L; w++) begin
        a = to_diff(aw[w]);
        p = to_diff(pw[w]);
        #1;
        checks++;
        if (s.t !== sw[w] || s.f !== ~sw[w]) begin
          failures++;
          $display("FAIL word %0d bit %0d: s=%b expected %0b", j, w, s, sw[w]);
        end
        cycle();
        checks++;
        if (!diff_valid(c)) begin
          failures++;
          $display("FAIL word %0d bit %0d: carry rails %b", j, w, c);
        end
      end
      cin = sw >> L;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
