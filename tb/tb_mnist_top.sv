// End-to-end testbench for mnist_top at its default parameters.
//
// Grayscale images go in; a reference model in the testbench binarizes them
// (pixel >= 128 is ink), counts the predictor matches of every digit for the
// binarized network, sums the lit pixels' weights for the quantized network,
// and takes the first maximum of each. For every image it checks:
//   * binarized network: the totals and the combinational decision, that the
//     registered decision still holds the previous image's result before the
//     edge and the new one after it;
//   * sequential binarized network (started together with the quantized
//     one): done with it, the same totals and decision as the reference;
//   * quantized network: done exactly 785 clocks after start, busy in
//     between, the ten signed sums and the decision.
// Stimulus: reset, one image per digit built from that digit's positive
// predictors, a blank image (a tie in both networks), images drawn with
// pixels exactly at the threshold (127 and 128), random images, and a start
// pulse given while the quantized network is busy. Each of these events is
// counted, and one that never happens is a failure.
module tb_mnist_top;
  import bnn_pkg::*;

  localparam mask_set_t   PM = default_pos_masks();
  localparam mask_set_t   NM = default_neg_masks();
  localparam weight_set_t WQ = default_weights();

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  gray_image_t gray;
  score_vec_t  totals;
  digit_t      decision, digit_q;
  logic        q_start = 1'b0;
  logic        s_busy, s_done;
  score_vec_t  s_totals;
  digit_t      s_digit;
  logic        q_busy, q_done;
  acc_vec_t    q_sums;
  digit_t      q_digit;

  int checks = 0, failures = 0;
  int bnn_decided [10];
  int qnn_decided [10];
  int bnn_ties = 0, qnn_ties = 0, at_threshold = 0, back_to_back = 0, ignored_starts = 0;

  mnist_top dut (
    .clk(clk), .rst_n(rst_n), .gray_i(gray),
    .bnn_totals_o(totals), .bnn_decision_o(decision), .bnn_digit_q(digit_q),
    .bsq_start_i(q_start), .bsq_busy_o(s_busy), .bsq_done_o(s_done),
    .bsq_totals_o(s_totals), .bsq_digit_o(s_digit),
    .qnn_start_i(q_start), .qnn_busy_o(q_busy), .qnn_done_o(q_done),
    .qnn_sums_o(q_sums), .qnn_digit_o(q_digit)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ink(int p);
    return gray[p / 28][p % 28] >= 8'd128;
  endfunction

  function automatic int wval(int d, int p);
    weight_t w = WQ[d][p];
    return int'(w);
  endfunction

  function automatic int sumval(int d);
    acc_t a = q_sums[d];
    return int'(a);
  endfunction

  function automatic int first_max(int v [10], output bit tie);
    int best = 0, cnt = 0;
    for (int d = 1; d < 10; d++) if (v[d] > v[best]) best = d;
    for (int d = 0; d < 10; d++) if (v[d] == v[best]) cnt++;
    tie = (cnt > 1);
    return best;
  endfunction

  int prev_exp = -1;

  // Called just after a rising edge with a new image in gray.
  task automatic apply(string what, bit poke_start);
    int tot [10], qs [10];
    bit tie, qtie, busy_ok;
    int exp, qexp, cycles;
    for (int d = 0; d < 10; d++) begin
      tot[d] = 0;
      qs[d]  = 0;
      for (int p = 0; p < NUM_PIXELS; p++) begin
        if (PM[d][p] && ink(p))  tot[d]++;
        if (NM[d][p] && !ink(p)) tot[d]++;
        if (ink(p)) qs[d] += wval(d, p);
      end
    end
    exp  = first_max(tot, tie);
    qexp = first_max(qs, qtie);
    if (tie)  bnn_ties++;
    if (qtie) qnn_ties++;
    for (int p = 0; p < NUM_PIXELS; p++)
      if (gray[p / 28][p % 28] inside {8'd127, 8'd128}) at_threshold++;

    // Binarized network.
    #1;
    checks++;
    for (int d = 0; d < 10; d++)
      if (int'(totals[d]) != tot[d]) begin
        failures++;
        $display("FAIL %s: bnn total[%0d]=%0d expected %0d", what, d, totals[d], tot[d]);
        break;
      end
    checks++;
    if (int'(decision) != exp) begin
      failures++;
      $display("FAIL %s: bnn decision %0d expected %0d", what, decision, exp);
    end
    if (prev_exp >= 0) begin
      checks++;
      back_to_back++;
      if (int'(digit_q) != prev_exp) begin
        failures++;
        $display("FAIL %s: bnn register %0d before edge, expected %0d", what, digit_q, prev_exp);
      end
    end
    bnn_decided[exp]++;
    q_start = 1'b1;
    @(posedge clk);
    #1;
    q_start = 1'b0;
    checks++;
    if (int'(digit_q) != exp) begin
      failures++;
      $display("FAIL %s: bnn registered decision %0d expected %0d", what, digit_q, exp);
    end
    prev_exp = exp;

    // Quantized network: started at the edge just passed.
    cycles  = 0;
    busy_ok = 1'b1;
    do begin
      @(posedge clk);
      #1;
      cycles++;
      q_start = (poke_start && cycles == 300);
      if (q_start) ignored_starts++;
      if (!q_done && !q_busy) busy_ok = 1'b0;
      if (s_done != q_done || s_busy != q_busy) busy_ok = 1'b0;
    end while (!q_done && cycles < 2000);
    q_start = 1'b0;
    checks++;
    if (cycles != QNN_CYCLES) begin
      failures++;
      $display("FAIL %s: qnn done after %0d cycles, expected %0d", what, cycles, QNN_CYCLES);
    end
    checks++;
    if (!busy_ok) begin
      failures++;
      $display("FAIL %s: qnn busy dropped early, or the sequential bnn handshake differs", what);
    end
    checks++;
    for (int d = 0; d < 10; d++)
      if (sumval(d) != qs[d]) begin
        failures++;
        $display("FAIL %s: qnn sum[%0d]=%0d expected %0d", what, d, sumval(d), qs[d]);
        break;
      end
    checks++;
    if (int'(q_digit) != qexp) begin
      failures++;
      $display("FAIL %s: qnn digit %0d expected %0d", what, q_digit, qexp);
    end
    qnn_decided[qexp]++;
    checks++;
    for (int d = 0; d < 10; d++)
      if (int'(s_totals[d]) != tot[d]) begin
        failures++;
        $display("FAIL %s: sequential bnn total[%0d]=%0d expected %0d", what, d, s_totals[d], tot[d]);
        break;
      end
    checks++;
    if (int'(s_digit) != exp) begin
      failures++;
      $display("FAIL %s: sequential bnn digit %0d expected %0d", what, s_digit, exp);
    end
    @(posedge clk);
    #1;
    checks++;
    if (q_busy || q_done || s_busy || s_done) begin
      failures++;
      $display("FAIL %s: qnn not idle after done", what);
    end
    // The binarized register has kept the image's decision all along.
    checks++;
    if (int'(digit_q) != exp) begin
      failures++;
      $display("FAIL %s: bnn register changed while the image was held", what);
    end
  endtask

  initial begin
    gray = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (digit_q !== '0 || q_digit !== '0 || q_busy || q_done || s_digit !== '0 || s_busy) begin
      failures++;
      $display("FAIL reset state");
    end
    rst_n = 1'b1;
    @(posedge clk);
    #1;

    // One image per digit: its positive predictors lit, the rest dark.
    for (int d = 0; d < 10; d++) begin
      for (int p = 0; p < NUM_PIXELS; p++)
        gray[p / 28][p % 28] = PM[d][p] ? 8'd200 : 8'd30;
      apply($sformatf("prototype of digit %0d", d), d == 4);
    end

    // Blank image: all binarized totals equal, all quantized sums zero.
    gray = '0;
    apply("blank", 1'b0);

    // Images drawn exactly at the threshold: 128 counts as ink, 127 not.
    for (int d = 0; d < 10; d++) begin
      for (int p = 0; p < NUM_PIXELS; p++)
        gray[p / 28][p % 28] = PM[(d + 3) % 10][p] ? 8'd128 :
                               (PM[d][p] ? 8'd127 : 8'd0);
      apply($sformatf("threshold image %0d", d), 1'b0);
    end

    // Random images of varying density.
    for (int t = 0; t < 40; t++) begin
      automatic int unsigned dens = $urandom_range(0, 100);
      for (int r = 0; r < 28; r++)
        for (int c = 0; c < 28; c++)
          gray[r][c] = ($urandom_range(0, 99) < dens) ? 8'($urandom_range(128, 255))
                                                     : 8'($urandom_range(0, 127));
      apply($sformatf("random %0d", t), t == 7);
    end

    // Event coverage.
    for (int d = 0; d < 10; d++) begin
      checks++;
      if (bnn_decided[d] == 0) begin
        failures++;
        $display("FAIL binarized network never decided digit %0d", d);
      end
    end
    checks++; if (bnn_ties == 0)       begin failures++; $display("FAIL no bnn tie");             end
    checks++; if (qnn_ties == 0)       begin failures++; $display("FAIL no qnn tie");             end
    checks++; if (at_threshold == 0)   begin failures++; $display("FAIL no threshold pixel");     end
    checks++; if (back_to_back == 0)   begin failures++; $display("FAIL no consecutive images");  end
    checks++; if (ignored_starts == 0) begin failures++; $display("FAIL no start while busy");    end
    $display("bnn decisions per digit: %p", bnn_decided);
    $display("qnn decisions per digit: %p", qnn_decided);
    $display("bnn_ties=%0d qnn_ties=%0d threshold_pixels=%0d consecutive=%0d ignored_starts=%0d",
             bnn_ties, qnn_ties, at_threshold, back_to_back, ignored_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
