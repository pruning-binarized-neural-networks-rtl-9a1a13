// Self-checking testbench for digit_node.
//
// The node is built with masks of the testbench's own: a positive and a
// negative mask made by a small linear congruential generator, which overlap
// in places so that double counting is exercised too. Random images of
// varying density, the empty image and the full image are applied, and the
// total is compared with a pixel-by-pixel reference count.
module tb_digit_node;
  import bnn_pkg::*;

  function automatic mask_t lcg_mask(int unsigned seed, int unsigned density_pct);
    mask_t m = '0;
    int unsigned s = seed;
    for (int p = 0; p < NUM_PIXELS; p++) begin
      s = s * 1103515245 + 12345;
      m[p] = ((s >> 16) % 100) < density_pct;
    end
    return m;
  endfunction

  localparam mask_t PM = lcg_mask(7, 20);
  localparam mask_t NM = lcg_mask(99, 25);

  bin_image_t img;
  score_t     total;
  int checks = 0, failures = 0;

  digit_node #(.POS_MASK(PM), .NEG_MASK(NM)) dut (.img_i(img), .total_o(total));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    int exp = 0;
    for (int p = 0; p < NUM_PIXELS; p++) begin
      if (PM[p] && img[p])  exp++;
      if (NM[p] && !img[p]) exp++;
    end
    checks++;
    if (int'(total) != exp) begin
      failures++;
      $display("FAIL %s: total %0d expected %0d", what, total, exp);
    end
  endtask

  initial begin
    img = '0;  #1 check("empty image");
    img = '1;  #1 check("full image");
    img = PM;  #1 check("image equal to positive mask");
    for (int t = 0; t < 300; t++) begin
      automatic int unsigned dens = $urandom_range(0, 100);
      for (int p = 0; p < NUM_PIXELS; p++) img[p] = ($urandom_range(0, 99) < dens);
      #1 check($sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
