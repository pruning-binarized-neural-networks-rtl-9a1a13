// Self-checking testbench for quant_classifier.
//
// The classifier is built with weights of the testbench's own (a linear
// congruential sequence over the full signed 8-bit range). For each image the
// testbench pulses start, counts the clocks until done and checks the count
// against 785 (784 pixels plus one decision cycle), checks that busy stays
// high in between, then compares the ten signed sums and the decision with a
// reference computed by a direct loop over the lit pixels. A start pulse is
// also given while busy, which must be ignored. Images: empty (all sums
// zero, a tie), full, one image that favours each digit, and random ones.
module tb_quant_classifier;
  import bnn_pkg::*;

  function automatic weight_set_t tb_weights();
    weight_set_t w;
    int unsigned s = 2024;
    for (int d = 0; d < NUM_DIGITS; d++)
      for (int p = 0; p < NUM_PIXELS; p++) begin
        s = s * 1664525 + 1013904223;
        w[d][p] = weight_t'(s >> 24);
      end
    return w;
  endfunction

  localparam weight_set_t W = tb_weights();

  // Signed value of a weight (a select of a packed array is unsigned).
  function automatic int wval(int d, int p);
    weight_t w = W[d][p];
    return int'(w);
  endfunction

  function automatic int sumval(acc_vec_t v, int d);
    acc_t a = v[d];
    return int'(a);
  endfunction

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  bin_image_t img;
  logic       start = 1'b0;
  logic       busy, done;
  acc_vec_t   sums;
  digit_t     digit;

  int checks = 0, failures = 0;
  int decided [10];
  int ignored_starts = 0, ties = 0;

  quant_classifier #(.WEIGHTS(W)) dut (
    .clk(clk), .rst_n(rst_n), .img_i(img), .start_i(start),
    .busy_o(busy), .done_o(done), .sums_o(sums), .digit_o(digit)
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
        if (img[p]) exp_sum[d] += wval(d, p);
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
      if (sumval(sums, d) != exp_sum[d]) begin
        failures++;
        $display("FAIL %s: sum[%0d]=%0d expected %0d", what, d, sumval(sums, d), exp_sum[d]);
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
    // Images of the pixels with positive weight for digit d.
    for (int d = 0; d < 10; d++) begin
      for (int p = 0; p < NUM_PIXELS; p++) img[p] = (wval(d, p) > 0);
      run($sformatf("favouring %0d", d), 1'b0);
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
