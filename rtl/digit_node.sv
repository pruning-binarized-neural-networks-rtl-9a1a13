// One digit node of the binarized single-layer network.
//
// The node holds two 784-bit predictor masks as parameters. A pixel counts for
// the digit when it is set in the image and in the positive mask (presence of
// a positive predictor), or clear in the image and set in the negative mask
// (absence of a negative predictor). The node sums the matches into the
// digit's total. Because the masks are constants, the AND with each weight
// folds into the logic itself and no weight memory exists: only the pixels a
// mask selects reach the adder, so a digit with 128 + 128 predictors sums 256
// single bits.
//
// Purely combinational. The sum is written as a loop; synthesis turns it into
// an adder tree. Keeping the two counts separate, so that overlapping masks
// count twice, is this design's choice; trained masks do not overlap.
module digit_node
  import bnn_pkg::*;
#(
  parameter mask_t POS_MASK = default_pos_masks()[0],
  parameter mask_t NEG_MASK = default_neg_masks()[0]
) (
  input  bin_image_t img_i,    // binary image, bit index = row*28 + col
  output score_t     total_o   // number of matching predictors
);

  always_comb begin
    score_t acc;
    acc = '0;
    for (int unsigned p = 0; p < NUM_PIXELS; p++) begin
      if (POS_MASK[p]) acc = acc + score_t'(img_i[p]);
      if (NEG_MASK[p]) acc = acc + score_t'(!img_i[p]);
    end
    total_o = acc;
  end

endmodule
