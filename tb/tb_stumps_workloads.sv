// tb_stumps_workloads: the BIST sized for the other benchmark circuits of
// the evaluation, each run through a complete session (1024 random patterns,
// 256 weighted patterns per weight set) against the reference model:
//   s9234  : 247 scan cells as 13 chains x 19, 50 weight sets
//   s13207 : 611 scan cells as 13 chains x 47, 29 weight sets
//   s15850 : 700 scan cells as 20 chains x 35, 12 weight sets
// (cell and weight-set counts of the evaluation; the chain split is this
// test's choice). The default-size configuration (214 cells, 12 sets) is
// covered by tb_sfnc_stumps_bist. ROM contents are the example weight sets.
module tb_stumps_workloads;
  logic [2:0] fin;
  int c0, c1, c2, f0, f1, f2;
  int checks, failures;

  stumps_session_check #(.NC(13), .L(19), .S(50), .NAME("s9234"))  w0 (.finished(fin[0]), .checks(c0), .failures(f0));
  stumps_session_check #(.NC(13), .L(47), .S(29), .NAME("s13207")) w1 (.finished(fin[1]), .checks(c1), .failures(f1));
  stumps_session_check #(.NC(20), .L(35), .S(12), .NAME("s15850")) w2 (.finished(fin[2]), .checks(c2), .failures(f2));

  initial begin
    wait (fin == 3'b111);
    checks = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #6000000;
    checks = c0 + c1 + c2;
    failures = f0 + f1 + f2 + 1;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
