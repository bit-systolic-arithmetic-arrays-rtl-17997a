// tb_sp_bit_cell: self-checking testbench for one multiplier bit-cell.
//
// Streams 40 random 8-bit words on a_in and on x_in against a multiplicand
// bit y that changes between words. Expected values come from integer
// arithmetic: per word, acc carries bit w of a + (x if y else 0) plus the
// carry from the previous word, one cycle after the inputs; s_out carries
// it one cycle later still; x_out is x_in delayed by one cycle; rail_err
// stays low once the cell has been flushed.
module tb_sp_bit_cell;
  import diff_pkg::*;

  localparam int L = 8;
  localparam int W = 40;
  localparam int C = L * W + 8;

  logic  phi1 = 1'b0, phi2 = 1'b0;
  diff_t x_in, y, a_in, x_out, acc, s_out;
  logic  rail_err;
  int checks = 0, failures = 0;
  logic xs[C];            // applied multiplier bit per cycle
  logic es[C];            // expected sum bit per cycle

  sp_bit_cell dut (
    .phi1(phi1), .phi2(phi2), .x_in(x_in), .y(y), .a_in(a_in),
    .x_out(x_out), .acc(acc), .s_out(s_out), .rail_err(rail_err)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string what, input int t);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s cycle %0d: got %0b exp %0b", what, t, got, exp);
    end
  endtask

  initial begin
    int unsigned cin;
    int t;
    cin = 0;
    t = 0;
    // flush: two zero cycles clear the carry, two more the product stages
    x_in = to_diff(1'b0); a_in = to_diff(1'b0); y = to_diff(1'b0);
    repeat (4) begin
      #1 phi2 = 1'b1; #1 phi2 = 1'b0; #1 phi1 = 1'b1; #1 phi1 = 1'b0; #1;
    end
    for (int j = 0; j <= W; j++) begin
      int unsigned aw, xw, sw;
      logic yb;
      aw = (j < W) ? $urandom_range(0, (1 << L) - 1) : 0;
      xw = (j < W) ? $urandom_range(0, (1 << L) - 1) : 0;
      yb = (j < W) ? 1'($urandom) : 1'b0;
      if (j == 0) yb = 1'b1;
      if (j == 1) yb = 1'b0;
      sw = aw + (yb ? xw : 0) + cin;
      cin = sw >> L;
      y = to_diff(yb);
      for (int w = 0; w < L; w++) begin
        x_in = to_diff(xw[w]);
        a_in = to_diff(aw[w]);
        xs[t] = xw[w];
        es[t] = sw[w];
        #1 phi2 = 1'b1; #1 phi2 = 1'b0; #1 phi1 = 1'b1; #1 phi1 = 1'b0; #1;
        chk(x_out.t, xs[t], "x_out", t);
        chk(acc.t, es[t], "acc", t);
        if (t > 0) chk(s_out.t, es[t-1], "s_out", t);
        chk(rail_err, 1'b0, "rail_err", t);
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
