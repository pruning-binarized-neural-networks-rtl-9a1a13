// Self-checking testbench for binarizer.
//
// Applies boundary values (0, 127, 128, 129, 255) at every pixel position and
// a series of random images, and compares each of the 784 output bits with a
// reference computed from the pixel value and its row-major position.
module tb_binarizer;
  import bnn_pkg::*;

  gray_image_t gray;
  bin_image_t  bin;
  int checks = 0, failures = 0;

  binarizer dut (.gray_i(gray), .bin_o(bin));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_image(string what);
    int bad = 0;
    for (int r = 0; r < 28; r++)
      for (int c = 0; c < 28; c++) begin
        logic exp = (gray[r][c] > 8'd127);
        if (bin[r*28 + c] !== exp) bad++;
      end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %s: %0d pixels wrong", what, bad);
    end
  endtask

  initial begin
    int vals[5] = '{0, 127, 128, 129, 255};
    foreach (vals[i]) begin
      for (int r = 0; r < 28; r++)
        for (int c = 0; c < 28; c++) gray[r][c] = 8'(vals[i]);
      #1 check_image($sformatf("uniform %0d", vals[i]));
    end
    // One bright pixel walking over the image: checks the casting order.
    for (int p = 0; p < 784; p += 13) begin
      gray = '0;
      gray[p / 28][p % 28] = 8'd128;
      #1;
      checks++;
      if (bin != (bin_image_t'(1) << p)) begin
        failures++;
        $display("FAIL walking pixel %0d", p);
      end
    end
    for (int t = 0; t < 200; t++) begin
      for (int r = 0; r < 28; r++)
        for (int c = 0; c < 28; c++) gray[r][c] = 8'($urandom_range(0, 255));
      #1 check_image($sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
