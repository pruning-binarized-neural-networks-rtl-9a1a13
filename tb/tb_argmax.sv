// Self-checking testbench for argmax.
//
// Drives random sets of ten totals, many drawn from a narrow range so that
// ties for the maximum are frequent, plus the corner cases all-equal,
// all-zero and maximum in the last position. The index and value are
// compared with a reference that keeps the first (lowest-index) maximum.
module tb_argmax;
  import bnn_pkg::*;

  score_vec_t totals;
  digit_t     digit;
  score_t     maxv;
  int checks = 0, failures = 0, ties = 0;

  argmax dut (.totals_i(totals), .digit_o(digit), .max_o(maxv));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    int best = 0, cnt = 0;
    for (int d = 1; d < 10; d++) if (totals[d] > totals[best]) best = d;
    for (int d = 0; d < 10; d++) if (totals[d] == totals[best]) cnt++;
    if (cnt > 1) ties++;
    checks++;
    if (int'(digit) != best || maxv != totals[best]) begin
      failures++;
      $display("FAIL %s: got %0d/%0d expected %0d/%0d", what, digit, maxv, best, totals[best]);
    end
  endtask

  initial begin
    totals = '0; #1 check("all zero");
    for (int d = 0; d < 10; d++) totals[d] = 11'd256; #1 check("all equal");
    for (int d = 0; d < 10; d++) totals[d] = score_t'(d); #1 check("ascending");
    totals[9] = '1; #1 check("max in last");
    for (int t = 0; t < 2000; t++) begin
      automatic int unsigned hi = (t % 2) ? 6 : 1568;
      for (int d = 0; d < 10; d++) totals[d] = score_t'($urandom_range(0, hi));
      #1 check($sformatf("random %0d", t));
    end
    checks++;
    if (ties == 0) begin
      failures++;
      $display("FAIL no tie was exercised");
    end
    $display("ties exercised: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
