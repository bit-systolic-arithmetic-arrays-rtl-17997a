// tb_sp_mac: self-checking testbench for the serial-parallel
// multiply-accumulator.
//
// Runs two sp_mac_checker instances side by side: one at the default
// four-bit width of the document's operation tables, and one at twelve
// bits, which exercises the claim that the array extends to any word length
// with the same cell and the same cycle schedule. It reports the combined
// count once both are done, or a failure if the watchdog expires first.
module tb_sp_mac;

  logic done4, done12;
  int   checks4, failures4, checks12, failures12;

  sp_mac_checker #(.N(4),  .W(40)) u_n4  (.done(done4),  .checks(checks4),  .failures(failures4));
  sp_mac_checker #(.N(12), .W(20)) u_n12 (.done(done12), .checks(checks12), .failures(failures12));

  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks12, failures4 + failures12 + 1);
    $finish;
  end

  initial begin
    wait (done4 === 1'b1 && done12 === 1'b1);
    $display("N=4: %0d checks, %0d failures; N=12: %0d checks, %0d failures",
             checks4, failures4, checks12, failures12);
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks12, failures4 + failures12);
    $finish;
  end

endmodule
