// sp_mac_checker: stimulus and checking for one sp_mac instance of width N,
// used by tb_sp_mac.
//
// Streams W back-to-back words (one every 2N cycles) of random multiplier x,
// multiplicand y and addend a, with a + x*y kept below 2**(2N), and checks
// every cycle after the first word enters:
//   * p against bit w of a + x*y in cycle s + N + 1 + w (the latency),
//   * acc_tap[k] against bit w of the cell-k partial sum a + x*(y with bits
//     below k cleared), formed in cycle s + N - 1 + w - 2k,
//   * x_out against the multiplier delayed N cycles,
//   * rail_err low.
// The expected values come from integer arithmetic, not from a model of the
// pipeline. A cycle is a phi2 pulse followed by a phi1 pulse; inputs change
// before phi2 and outputs are read after phi1. It drives its own clock
// phases, raises done when finished and leaves reporting to its parent.
// N may be at most 15 (64-bit reference arithmetic).
module sp_mac_checker #(
  parameter int N = 4,
  parameter int W = 40
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int S0 = 4 * N;        // cycle of word 0's first multiplier bit
  localparam int T  = S0 + 2 * N * W + 2 * N;

  logic         phi1 = 1'b0, phi2 = 1'b0;
  logic         x, a;
  logic [N-1:0] y;
  logic         p, x_out, rail_err;
  logic [N-1:0] acc_tap;


  longint unsigned xw[W], yw[W], aw[W];

  sp_mac #(.N(N)) dut (
    .phi1(phi1), .phi2(phi2), .x(x), .y(y), .a(a),
    .p(p), .x_out(x_out), .acc_tap(acc_tap), .rail_err(rail_err)
  );

  function automatic int sj(int j);
    return S0 + 2 * N * j;
  endfunction

  // Word whose 2N-cycle window of offset `off` contains cycle t, or -1.
  function automatic int word_of(int t, int off);
    int d = t - S0 - off;
    if (d < 0) return -1;
    if (d / (2 * N) >= W) return -1;
    return d / (2 * N);
  endfunction

  task automatic check(input logic got, input logic exp, input string what, input int t);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s cycle %0d: got %0b exp %0b", what, t, got, exp);
    end
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    for (int j = 0; j < W; j++) begin
      xw[j] = 64'($urandom_range(0, (1 << N) - 1));
      yw[j] = 64'($urandom_range(0, (1 << N) - 1));
      if (j % 4 == 0) aw[j] = 0;
      else aw[j] = 64'($urandom_range(0, (1 << (2 * N)) - 1 - int'(xw[j] * yw[j])));
    end
    // A few words at the limits: largest product, largest sum.
    xw[1] = (1 << N) - 1; yw[1] = (1 << N) - 1; aw[1] = 0;
    xw[2] = (1 << N) - 1; yw[2] = (1 << N) - 1;
    aw[2] = (1 << (2 * N)) - 1 - xw[2] * yw[2];

    for (int t = 0; t < T; t++) begin
      int j, i, w;
      // multiplier: bit i of word j in cycle s_j + i
      x = 1'b0;
      j = word_of(t, 0);
      if (j >= 0 && t - sj(j) < N) x = xw[j][t - sj(j)];
      // multiplicand: word j's value from cycle s_j - 1
      j = word_of(t + 1, 0);
      y = (j >= 0) ? N'(yw[j]) : (t + 1 >= S0 + 2 * N * W ? N'(yw[W-1]) : '0);
      // addend: bit w of word j in cycle s_j + w - N + 1
      a = 1'b0;
      j = word_of(t, 1 - N);
      if (j >= 0) a = aw[j][t - sj(j) + N - 1];

      #1 phi2 = 1'b1;
      #1 phi2 = 1'b0;
      #1 phi1 = 1'b1;
      #1 phi1 = 1'b0;
      #1;

      // outputs now show cycle u = t + 1
      begin
        int u;
        longint unsigned r, ymask;
        u = t + 1;
        j = word_of(u, N + 1);
        if (j >= 0) begin
          r = aw[j] + xw[j] * yw[j];
          check(p, r[u - sj(j) - N - 1], "p", u);
        end
        for (int k = 0; k < N; k++) begin
          j = word_of(u, N - 2 * k);
          if (j >= 0) begin
            ymask = yw[j] & ~((longint'(1) << k) - 1);
            r = aw[j] + xw[j] * ymask;
            check(acc_tap[k], r[u - sj(j) - N + 2 * k], $sformatf("acc_tap[%0d]", k), u);
          end
        end
        j = word_of(u, N);
        if (j >= 0) begin
          i = u - sj(j) - N;
          check(x_out, (i < N) ? xw[j][i] : 1'b0, "x_out", u);
        end
        if (u >= S0) check(rail_err, 1'b0, "rail_err", u);
      end
    end
    done = 1'b1;
  end

endmodule
