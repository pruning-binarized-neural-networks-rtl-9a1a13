// Self-checking testbench for bnn_serial_classifier.
//
// The classifier is built with masks of the testbench's own (a linear
// congruential generator, about 20 % positive and 20 % negative predictors,
// overlapping in places). For each image the testbench pulses start, counts
// the clocks until done and checks the count against 785 (784 pixels plus
// one decision cycle), checks that busy stays high in between, then compares
// the ten totals and the decision with a reference count over the pixels. A
// start pulse is also given while busy, which must be ignored. Images: empty
// and full, each digit's positive mask, random ones, and a random image on
// which the maximum is shared (found by search).
module tb_bnn_serial_classifier;
  import bnn_pkg::*;

  function automatic mask_set_t lcg_masks(int unsigned seed);
    mask_set_t m = '0;
    int unsigned s = seed;
    for (int d = 0; d < NUM_DIGITS; d++)
      for (int p = 0; p < NUM_PIXELS; p++) begin
        s = s * 1103515245 + 12345;
        m[d][p] = ((s >> 16) % 100) < 20;
      end
    return m;
  endfunction

  localparam mask_set_t PM = lcg_masks(3);
  localparam mask_set_t NM = lcg_masks(77);

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  bin_image_t img;
  logic       start = 1'b0;
  logic       busy, done;
  score_vec_t sums;
  digit_t     digit;

  int checks = 0, failures = 0;
  int decided [10];
  int ignored_starts = 0, ties = 0;

  bnn_serial_classifier #(.POS_MASKS(PM), .NEG_MASKS(NM)) dut (
    .clk(clk), .rst_n(rst_n), .img_i(img), .start_i(start),
    .busy_o(busy), .done_o(done), .totals_o(sums), .digit_o(digit)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(string what, bit poke_start);
    int exp_sum [10];
    int best = 0, cycles = 0, cnt = 0;
    bit busy_ok = 1'b1;
    for (int d = 0; d < 10; d++) begin
      exp_sum[d] = 0;
      for (int p = 0; p < NUM_PIXELS; p++)
        exp_sum[d] += int'(PM[d][p] && img[p]) + int'(NM[d][p] && !img[p]);
    end
    for (int d = 1; d < 10; d++) if (exp_sum[d] > exp_sum[best]) best = d;
    for (int d = 0; d < 10; d++) if (exp_sum[d] == exp_sum[best]) cnt++;
    if (cnt > 1) ties++;

    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    do begin
      @(posedge clk);
      #1;
      cycles++;
      if (poke_start && cycles == 100) begin
        start <= 1'b1;
        ignored_starts++;
      end else start <= 1'b0;
      if (!done && !busy) busy_ok = 1'b0;
    end while (!done && cycles < 2000);
    checks++;
    if (cycles != QNN_CYCLES) begin
      failures++;
      $display("FAIL %s: done after %0d cycles, expected %0d", what, cycles, QNN_CYCLES);
    end
    checks++;
    if (!busy_ok) begin
      failures++;
      $display("FAIL %s: busy dropped before done", what);
    end
    checks++;
    for (int d = 0; d < 10; d++)
      if (int'(sums[d]) != exp_sum[d]) begin
        failures++;
        $display("FAIL %s: total[%0d]=%0d expected %0d", what, d, sums[d], exp_sum[d]);
        break;
      end
    checks++;
    if (int'(digit) != best) begin
      failures++;
      $display("FAIL %s: digit %0d expected %0d", what, digit, best);
    end
    decided[best]++;
    @(posedge clk);
    #1;
    checks++;
    if (busy || done) begin
      failures++;
      $display("FAIL %s: not idle after done (a start while busy was taken?)", what);
    end
  endtask

  initial begin
    img = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run("empty", 1'b0);
    img = '1;
    run("full", 1'b1);
    // Each digit's positive mask, with its negative predictors dark.
    for (int d = 0; d < 10; d++) begin
      img = PM[d] & ~NM[d];
      run($sformatf("favouring %0d", d), 1'b0);
    end
    // Search random images for one on which the maximum is shared, and run
    // it: the lowest tied digit must win.
    for (int t = 0; t < 400 && ties == 0; t++) begin
      int best;
      for (int p = 0; p < NUM_PIXELS; p++) img[p] = $urandom_range(0, 1);
      best = 0;
      begin
        int tot [10];
        int cnt = 0;
        for (int d = 0; d < 10; d++) begin
          tot[d] = 0;
          for (int p = 0; p < NUM_PIXELS; p++)
            tot[d] += int'(PM[d][p] && img[p]) + int'(NM[d][p] && !img[p]);
        end
        for (int d = 1; d < 10; d++) if (tot[d] > tot[best]) best = d;
        for (int d = 0; d < 10; d++) if (tot[d] == tot[best]) cnt++;
        if (cnt > 1) run($sformatf("tie search %0d", t), 1'b0);
      end
    end
    for (int t = 0; t < 8; t++) begin
      for (int p = 0; p < NUM_PIXELS; p++) img[p] = $urandom_range(0, 1);
      run($sformatf("random %0d", t), t == 3);
    end
    for (int d = 0; d < 10; d++) begin
      checks++;
      if (decided[d] == 0) begin
        failures++;
        $display("FAIL digit %0d never decided", d);
      end
    end
    checks++; if (ignored_starts == 0) begin failures++; $display("FAIL no start while busy"); end
    checks++; if (ties == 0)           begin failures++; $display("FAIL no tie"); end
    $display("decided=%p ignored_starts=%0d ties=%0d", decided, ignored_starts, ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
