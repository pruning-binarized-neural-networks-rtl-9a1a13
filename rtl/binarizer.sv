// Input transform of the classifier: binarization and casting.
//
// Every 8-bit grayscale pixel of the 28x28 image is compared with a fixed
// threshold (128, half of full scale): darker pixels become background '0',
// brighter ones digit '1'. The binary 28x28 image is then cast, row by row,
// into the flat 784-bit vector the fully-connected layer works on
// (bit index = row*28 + col).
//
// Purely combinational; no clock. With the default threshold of 128 the
// comparison reduces to the most significant bit of each pixel, so the block
// costs no logic in practice. A pixel equal to the threshold maps to '1';
// that tie rule, the >= comparison and the row-major bit order are this
// design's choices.
module binarizer
  import bnn_pkg::*;
#(
  parameter int unsigned THRESH = BIN_THRESH
) (
  input  gray_image_t gray_i,   // gray_i[row][col], 0..255
  output bin_image_t  bin_o     // bin_o[row*IMG_W + col]
);

  always_comb begin
    for (int unsigned r = 0; r < IMG_H; r++)
      for (int unsigned c = 0; c < IMG_W; c++)
        bin_o[r*IMG_W + c] = (int'(gray_i[r][c]) >= int'(THRESH));
  end

endmodule
