// Self-checking testbench for bnn_classifier at its default parameters.
//
// A reference model in the testbench counts the predictor matches of every digit from the mask sets and picks the
// first maximum. The DUT is checked on its combinational totals and
// decision, and on the registered decision one clock later; images are
// applied on consecutive clocks to show one classification per cycle.
//
// Stimulus: the reset value, an image built from each digit's positive
// predictors (so that every digit 0..9 is decided at least once), a blank
// image (all totals equal: a tie), and random images. Each of these events
// is counted and a missing one is a failure.
module tb_bnn_classifier;
  import bnn_pkg::*;

  localparam mask_set_t PM = default_pos_masks();
  localparam mask_set_t NM = default_neg_masks();

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  bin_image_t  img;
  score_vec_t  totals;
  digit_t      decision, digit_q;

  int checks = 0, failures = 0;
  int decided [10];
  int ties = 0, back_to_back = 0;

  bnn_classifier dut (
    .clk(clk), .rst_n(rst_n), .img_i(img),
    .totals_o(totals), .decision_o(decision), .digit_q(digit_q)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference classification of the current image.
  function automatic int ref_digit(output int tot [10], output bit tie);
    int best = 0, cnt = 0;
    for (int d = 0; d < 10; d++) begin
      tot[d] = 0;
      for (int p = 0; p < NUM_PIXELS; p++) begin
        if (PM[d][p] && img[p])  tot[d]++;
        if (NM[d][p] && !img[p]) tot[d]++;
      end
    end
    for (int d = 1; d < 10; d++) if (tot[d] > tot[best]) best = d;
    for (int d = 0; d < 10; d++) if (tot[d] == tot[best]) cnt++;
    tie = (cnt > 1);
    return best;
  endfunction

  int prev_exp = -1;

  // Apply the image in img just after a rising edge, check the
  // combinational outputs, and on the next edge check that the register
  // holds this decision.
  task automatic apply(string what);
    int tot [10];
    bit tie;
    int exp;
    #1;
    exp = ref_digit(tot, tie);
    checks++;
    for (int d = 0; d < 10; d++)
      if (int'(totals[d]) != tot[d]) begin
        failures++;
        $display("FAIL %s: total[%0d]=%0d expected %0d", what, d, totals[d], tot[d]);
        break;
      end
    checks++;
    if (int'(decision) != exp) begin
      failures++;
      $display("FAIL %s: decision %0d expected %0d", what, decision, exp);
    end
    // The register still shows the previous image's decision.
    if (prev_exp >= 0) begin
      checks++;
      back_to_back++;
      if (int'(digit_q) != prev_exp) begin
        failures++;
        $display("FAIL %s: register %0d before edge, expected %0d", what, digit_q, prev_exp);
      end
    end
    decided[exp]++;
    if (tie) ties++;
    @(posedge clk);
    #1;
    checks++;
    if (int'(digit_q) != exp) begin
      failures++;
      $display("FAIL %s: registered decision %0d expected %0d", what, digit_q, exp);
    end
    prev_exp = exp;
  endtask

  initial begin
    img = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (digit_q !== '0) begin
      failures++;
      $display("FAIL reset value %0d", digit_q);
    end
    rst_n = 1'b1;
    @(posedge clk);

    // One image per digit: its positive predictors lit, the rest dark.
    for (int d = 0; d < 10; d++) begin
      img = PM[d];
      apply($sformatf("prototype of digit %0d", d));
    end

    // Blank image: every digit sees all its negative predictors absent.
    img = '0;
    apply("blank");

    // Full image: every digit sees all its positive predictors present.
    img = '1;
    apply("full");

    // Random images of varying density.
    for (int t = 0; t < 60; t++) begin
      automatic int unsigned dens = $urandom_range(0, 100);
      for (int p = 0; p < NUM_PIXELS; p++) img[p] = ($urandom_range(0, 99) < dens);
      apply($sformatf("random %0d", t));
    end

    // Event coverage.
    for (int d = 0; d < 10; d++) begin
      checks++;
      if (decided[d] == 0) begin
        failures++;
        $display("FAIL digit %0d was never decided", d);
      end
    end
    checks++; if (ties == 0)         begin failures++; $display("FAIL no tie");               end
    checks++; if (back_to_back == 0) begin failures++; $display("FAIL no back-to-back image"); end
    $display("decisions per digit: %p", decided);
    $display("ties=%0d back_to_back=%0d", ties, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
