// Predictor-selection strategies on bnn_classifier.
//
// The binarized network is built several times with masks of different
// strategies and sizes: presence of positive predictors only, absence of
// negative predictors only, and the dual matchup with the count split evenly
// between the two, for N = 2, 32, 256 and 512 predictors per digit; and the
// simple predictor-pixel classifier, in which each pixel is a positive
// predictor of at most one digit and the digit with most lit pixels wins. The
// masks come from the same kind of permutation as the default ones
// (pixel = (stride_d*k + offset_d) mod 784, coprime stride), so they are
// distinct within a digit. Every instance sees the same images (blank, full,
// each configuration's prototype, random) and is checked against a reference
// count; each instance must reach its largest possible total once, so the 512 cases
// show that totals beyond 256 are carried.
module tb_bnn_strategies;
  import bnn_pkg::*;

  localparam int NCFG = 13;
  // cfg i < 12: strategy = i / 4 (0 positive, 1 negative, 2 dual), size = SIZES[i % 4]
  // cfg 12: predictor-pixel map, every pixel a positive predictor of at most
  //         one digit (pixel p -> digit (7*p) mod 10, one pixel in three left
  //         out as if below the activation threshold), no negative predictors
  localparam int SIZES [4] = '{2, 32, 256, 512};

  function automatic int n_pos(int cfg);
    int n = SIZES[cfg % 4];
    case (cfg / 4)
      0: return n;
      1: return 0;
      default: return n / 2;
    endcase
  endfunction

  function automatic int n_neg(int cfg);
    return SIZES[cfg % 4] - n_pos(cfg);
  endfunction

  function automatic int pix(int d, int k);
    int stride [10] = '{193, 211, 223, 227, 229, 233, 239, 241, 251, 257};
    return (stride[d] * k + 31 * d + 5) % NUM_PIXELS;
  endfunction

  function automatic mask_set_t pos_set(int cfg);
    mask_set_t m = '0;
    if (cfg == 12) begin
      for (int p = 0; p < NUM_PIXELS; p++)
        if (p % 3 != 0) m[(7 * p) % 10][p] = 1'b1;
      return m;
    end
    for (int d = 0; d < 10; d++)
      for (int k = 0; k < n_pos(cfg); k++) m[d][pix(d, k)] = 1'b1;
    return m;
  endfunction

  function automatic mask_set_t neg_set(int cfg);
    mask_set_t m = '0;
    if (cfg == 12) return m;
    for (int d = 0; d < 10; d++)
      for (int k = n_pos(cfg); k < n_pos(cfg) + n_neg(cfg); k++) m[d][pix(d, k)] = 1'b1;
    return m;
  endfunction

  // Largest total a configuration can produce (reached by the full or a
  // prototype image).
  function automatic int full_total(int cfg);
    mask_set_t pm = pos_set(cfg), nm = neg_set(cfg);
    int best = 0;
    for (int d = 0; d < 10; d++) begin
      int n = 0;
      for (int p = 0; p < NUM_PIXELS; p++) n += int'(pm[d][p]) + int'(nm[d][p]);
      if (n > best) best = n;
    end
    return best;
  endfunction

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  bin_image_t img;
  score_vec_t totals   [NCFG];
  digit_t     decision [NCFG];
  digit_t     digit_q  [NCFG];

  int checks = 0, failures = 0;
  int max_seen [NCFG];

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    bnn_classifier #(.POS_MASKS(pos_set(i)), .NEG_MASKS(neg_set(i))) dut (
      .clk(clk), .rst_n(rst_n), .img_i(img),
      .totals_o(totals[i]), .decision_o(decision[i]), .digit_q(digit_q[i])
    );
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(string what);
    for (int i = 0; i < NCFG; i++) begin
      mask_set_t pm = pos_set(i), nm = neg_set(i);
      int tot [10];
      int best = 0;
      for (int d = 0; d < 10; d++) begin
        tot[d] = 0;
        for (int p = 0; p < NUM_PIXELS; p++) begin
          if (pm[d][p] && img[p])  tot[d]++;
          if (nm[d][p] && !img[p]) tot[d]++;
        end
        if (tot[d] > max_seen[i]) max_seen[i] = tot[d];
      end
      for (int d = 1; d < 10; d++) if (tot[d] > tot[best]) best = d;
      checks++;
      for (int d = 0; d < 10; d++)
        if (int'(totals[i][d]) != tot[d]) begin
          failures++;
          $display("FAIL %s cfg %0d: total[%0d]=%0d expected %0d", what, i, d, totals[i][d], tot[d]);
          break;
        end
      checks++;
      if (int'(decision[i]) != best) begin
        failures++;
        $display("FAIL %s cfg %0d: decision %0d expected %0d", what, i, decision[i], best);
      end
    end
  endtask

  initial begin
    img = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 check_all("blank");
    img = '1;
    #1 check_all("full");
    // Each configuration's digit-0 prototype: positive predictors lit, the
    // rest dark, which gives digit 0 the full N.
    for (int i = 0; i < NCFG; i++) begin
      img = pos_set(i)[0];
      #1 check_all($sformatf("prototype of cfg %0d", i));
    end
    for (int t = 0; t < 60; t++) begin
      automatic int unsigned dens = $urandom_range(0, 100);
      for (int p = 0; p < NUM_PIXELS; p++) img[p] = ($urandom_range(0, 99) < dens);
      #1 check_all($sformatf("random %0d", t));
    end
    for (int i = 0; i < NCFG; i++) begin
      checks++;
      if (max_seen[i] != full_total(i)) begin
        failures++;
        $display("FAIL cfg %0d: largest total %0d, expected %0d to be reached", i, max_seen[i], full_total(i));
      end
    end
    $display("largest totals per configuration: %p", max_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
