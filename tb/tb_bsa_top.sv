// tb_bsa_top: end-to-end testbench of the whole design at its default size.
//
// Runs a schedule of words through the multiply-accumulator, one every 2N
// cycles, mixing three kinds of operation:
//   * multiply        (external addend, zero),
//   * multiply-add    (external addend, nonzero),
//   * accumulate      (acc_en high: the previous result is the addend),
// with the multiplicand changed between words. Accumulation runs are kept
// below 2**(2N) so no carry leaves the word. Every p bit is checked against
// integer arithmetic at its cycle, which also checks the 2N-cycle
// addend-to-output latency the feedback depends on. In parallel, the
// complex gate gets random inputs every cycle and F is checked against
// AB + CD of the inputs present at the end of phi2. Each mechanism is
// counted, and one that never occurs counts as a failure.
module tb_bsa_top;

  localparam int N  = 4;            // must match bsa_top's default
  localparam int W  = 60;
  localparam int S0 = 4 * N;
  localparam int T  = S0 + 2 * N * W + 2 * N;
  localparam longint unsigned LIM = longint'(1) << (2 * N);

  typedef enum logic [1:0] {OP_MUL, OP_MAC, OP_ACC} op_e;

  logic         phi1 = 1'b0, phi2 = 1'b0;
  logic         x, a_ext, acc_en;
  logic [N-1:0] y;
  logic         p, x_out, rail_err;
  logic [N-1:0] acc_tap;
  logic         ga, gb, gc, gd, gf;

  int checks = 0, failures = 0;
  int n_mul = 0, n_mac = 0, n_acc = 0, n_ychg = 0, n_gate1 = 0, n_gate0 = 0;

  longint unsigned xw[W], yw[W], aw[W], rw[W];
  op_e             opw[W];

  bsa_top dut (
    .phi1(phi1), .phi2(phi2), .x(x), .y(y), .a_ext(a_ext), .acc_en(acc_en),
    .p(p), .x_out(x_out), .acc_tap(acc_tap), .rail_err(rail_err),
    .gate_a(ga), .gate_b(gb), .gate_c(gc), .gate_d(gd), .gate_f(gf)
  );

  function automatic int sj(int j);
    return S0 + 2 * N * j;
  endfunction

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
    #(20 * T + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Build the schedule and its expected results.
  task automatic build_schedule();
    longint unsigned prev = 0;
    for (int j = 0; j < W; j++) begin
      int r = int'($urandom_range(0, 9));
      opw[j] = (j == 0) ? OP_MUL : (r < 3 ? OP_MUL : (r < 5 ? OP_MAC : OP_ACC));
      xw[j]  = 64'($urandom_range(0, (1 << N) - 1));
      yw[j]  = 64'($urandom_range(0, (1 << N) - 1));
      case (opw[j])
        OP_MUL: aw[j] = 0;
        OP_MAC: aw[j] = 64'($urandom_range(0, int'(LIM - 1 - xw[j] * yw[j])));
        default: begin
          aw[j] = prev;
          // keep the running sum inside the word
          for (int k = 0; k < 20 && prev + xw[j] * yw[j] >= LIM; k++) begin
            xw[j] = 64'($urandom_range(0, (1 << N) - 1));
            yw[j] = 64'($urandom_range(0, (1 << N) - 1));
          end
          if (prev + xw[j] * yw[j] >= LIM) xw[j] = 0;
        end
      endcase
      rw[j] = aw[j] + xw[j] * yw[j];
      prev  = rw[j];
    end
  endtask

  initial begin
    build_schedule();
    ga = 0; gb = 0; gc = 0; gd = 0;
    for (int t = 0; t < T; t++) begin
      int j, u;
      logic fexp;
      x = 1'b0;
      j = word_of(t, 0);
      if (j >= 0 && t - sj(j) < N) x = xw[j][t - sj(j)];
      j = word_of(t + 1, 0);
      if (j >= 0) y = N'(yw[j]);
      else if (t + 1 < S0) y = '0;
      if (j > 0 && t + 1 == sj(j) && yw[j] != yw[j-1]) n_ychg++;
      // addend window of word j: cycles s_j - N + 1 .. s_j + N
      a_ext  = 1'b0;
      acc_en = 1'b0;
      j = word_of(t, 1 - N);
      if (j >= 0) begin
        acc_en = (opw[j] == OP_ACC);
        a_ext  = (opw[j] == OP_ACC) ? ~aw[j][t - sj(j) + N - 1]   // ignored
                                    : aw[j][t - sj(j) + N - 1];
      end
      {ga, gb, gc, gd} = 4'($urandom);
      fexp = (ga & gb) | (gc & gd);

      #1 phi2 = 1'b1;
      #1 phi2 = 1'b0;
      // inputs of the gate change after phi2: F must not follow them
      #1 {ga, gb, gc, gd} = 4'($urandom);
      phi1 = 1'b1;
      #1 phi1 = 1'b0;
      #1;

      check(gf, fexp, "gate_f", t);
      if (fexp) n_gate1++; else n_gate0++;

      u = t + 1;
      j = word_of(u, N + 1);
      if (j >= 0) begin
        check(p, rw[j][u - sj(j) - N - 1], "p", u);
        if (u - sj(j) - N - 1 == 2 * N - 1) begin
          case (opw[j])
            OP_MUL: n_mul++;
            OP_MAC: n_mac++;
            default: n_acc++;
          endcase
        end
      end
      j = word_of(u, N);
      if (j >= 0 && u - sj(j) - N < N) check(x_out, xw[j][u - sj(j) - N], "x_out", u);
      if (u >= S0) check(rail_err, 1'b0, "rail_err", u);
    end
    $display("words: multiply %0d, multiply-add %0d, accumulate %0d; multiplicand changes %0d; gate F=1 %0d, F=0 %0d",
             n_mul, n_mac, n_acc, n_ychg, n_gate1, n_gate0);
    if (n_mul == 0 || n_mac == 0 || n_acc == 0 || n_ychg == 0 || n_gate1 == 0 || n_gate0 == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
