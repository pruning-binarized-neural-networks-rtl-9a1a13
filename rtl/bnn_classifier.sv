// Binarized single-layer MNIST digit classifier, weights folded into logic.
//
// Takes the 784-bit binary image. Ten digit nodes each count how many of
// their positive predictor pixels are present and how many of their negative
// predictor pixels are absent (128 + 128 per digit by default, the
// dual-matchup configuration). A maximum-value evaluator picks the digit with
// the largest total.
//
// Everything from the image to the decision is one combinational path; the
// only storage is the 4-bit register that captures the decision, so a
// decision appears at the clock edge after the image is applied, and a new
// image can be applied on every clock. The totals and the unregistered
// decision are brought out as well for observation.
//
// The predictor masks are parameters: pass the masks selected from a trained
// network. The defaults are a placeholder pattern of the same shape (see
// bnn_pkg). Reset of the decision register (asynchronous, active low, to 0)
// is this design's choice.
module bnn_classifier
  import bnn_pkg::*;
#(
  parameter mask_set_t POS_MASKS = default_pos_masks(),
  parameter mask_set_t NEG_MASKS = default_neg_masks()
) (
  input  logic       clk,
  input  logic       rst_n,
  input  bin_image_t img_i,        // binary image, bit index = row*28 + col
  output score_vec_t totals_o,     // digit totals (combinational)
  output digit_t     decision_o,   // argmax of the totals (combinational)
  output digit_t     digit_q       // registered decision
);

  for (genvar d = 0; d < NUM_DIGITS; d++) begin : g_node
    digit_node #(
      .POS_MASK (POS_MASKS[d]),
      .NEG_MASK (NEG_MASKS[d])
    ) u_node (
      .img_i   (img_i),
      .total_o (totals_o[d])
    );
  end

  score_t max_total;   // not needed for the decision

  argmax #(.N(NUM_DIGITS), .W(SCORE_W), .SIGNED(1'b0)) u_argmax (
    .totals_i (totals_o),
    .digit_o  (decision_o),
    .max_o    (max_total)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) digit_q <= '0;
    else        digit_q <= decision_o;
  end

endmodule
