// Top level: FPGA handwritten-digit classification with two single-layer
// networks on one input image.
//
// A 28x28 8-bit grayscale MNIST image enters on gray_i. The binarizer
// thresholds it at half scale and flattens it to 784 bits; that binary image
// feeds both classifiers:
//   * bnn_classifier, the binarized network with its predictor masks folded
//     into combinational logic: its decision is valid one clock after the
//     image, and it accepts a new image every clock;
//   * bnn_serial_classifier, the same binarized network (same masks) in its
//     sequential form, one pixel per clock, 785 clocks from start to done;
//   * quant_classifier, the 8-bit quantized network, which sums one pixel per
//     clock and reports its decision 785 clocks after start, with done.
// The image must stay stable while a sequential classifier is busy.
// All parameters are passed through; their defaults are placeholder masks and
// weights of the right shape (see bnn_pkg).
module mnist_top
  import bnn_pkg::*;
#(
  parameter int unsigned THRESH    = BIN_THRESH,
  parameter mask_set_t   POS_MASKS = default_pos_masks(),
  parameter mask_set_t   NEG_MASKS = default_neg_masks(),
  parameter weight_set_t WEIGHTS   = default_weights()
) (
  input  logic        clk,
  input  logic        rst_n,
  input  gray_image_t gray_i,           // image, gray_i[row][col]
  // binarized network
  output score_vec_t  bnn_totals_o,     // per-digit match counts (combinational)
  output digit_t      bnn_decision_o,   // combinational decision
  output digit_t      bnn_digit_q,      // registered decision
  // binarized network, sequential form
  input  logic        bsq_start_i,
  output logic        bsq_busy_o,
  output logic        bsq_done_o,
  output score_vec_t  bsq_totals_o,
  output digit_t      bsq_digit_o,
  // 8-bit quantized network
  input  logic        qnn_start_i,
  output logic        qnn_busy_o,
  output logic        qnn_done_o,
  output acc_vec_t    qnn_sums_o,
  output digit_t      qnn_digit_o
);

  bin_image_t img;

  binarizer #(.THRESH(THRESH)) u_binarizer (
    .gray_i (gray_i),
    .bin_o  (img)
  );

  bnn_classifier #(
    .POS_MASKS (POS_MASKS),
    .NEG_MASKS (NEG_MASKS)
  ) u_bnn (
    .clk        (clk),
    .rst_n      (rst_n),
    .img_i      (img),
    .totals_o   (bnn_totals_o),
    .decision_o (bnn_decision_o),
    .digit_q    (bnn_digit_q)
  );

  bnn_serial_classifier #(
    .POS_MASKS (POS_MASKS),
    .NEG_MASKS (NEG_MASKS)
  ) u_bsq (
    .clk      (clk),
    .rst_n    (rst_n),
    .img_i    (img),
    .start_i  (bsq_start_i),
    .busy_o   (bsq_busy_o),
    .done_o   (bsq_done_o),
    .totals_o (bsq_totals_o),
    .digit_o  (bsq_digit_o)
  );

  quant_classifier #(.WEIGHTS(WEIGHTS)) u_qnn (
    .clk     (clk),
    .rst_n   (rst_n),
    .img_i   (img),
    .start_i (qnn_start_i),
    .busy_o  (qnn_busy_o),
    .done_o  (qnn_done_o),
    .sums_o  (qnn_sums_o),
    .digit_o (qnn_digit_o)
  );

endmodule
