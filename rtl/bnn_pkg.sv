// Shared constants, types and the default predictor masks of the binarized
// single-layer MNIST classifier.
//
// The classifier looks at a 28x28 binary image, flattened row by row into a
// 784-bit vector (bit index = row*28 + col). Each of the ten digit nodes owns
// two 784-bit masks: the pixels whose presence argues for that digit
// (positive predictors) and the pixels whose absence argues for it (negative
// predictors). In the evaluated "dual matchup" configuration each digit uses
// 128 positive and 128 negative predictors, 2560 binary decisions in all.
//
// The trained masks are selected from the strongest weights of a trained
// single-layer network; they are data, not logic, and are passed in through
// module parameters. The masks produced by default_pos_masks() and
// default_neg_masks() are a deterministic placeholder with the right shape:
// for digit d, the k-th selected pixel is (MASK_STRIDE[d]*k + MASK_OFFSET[d])
// mod 784. The stride is coprime to 784, so the map is a permutation and the
// first 128 values (positive) and the next 128 (negative) are all distinct.
// Replace them with trained masks to classify real digits. The same holds
// for the signed 8-bit weights of the quantized network (default_weights()).
package bnn_pkg;

  localparam int unsigned IMG_W        = 28;
  localparam int unsigned IMG_H        = 28;
  localparam int unsigned NUM_PIXELS   = IMG_W * IMG_H;   // 784
  localparam int unsigned NUM_DIGITS   = 10;
  localparam int unsigned PIXEL_BITS   = 8;               // grayscale 0..255
  localparam int unsigned BIN_THRESH   = 128;             // 50 % grayscale
  localparam int unsigned N_POS        = 128;             // positive predictors per digit
  localparam int unsigned N_NEG        = 128;             // negative predictors per digit

  // A digit total counts at most every pixel twice (once as a positive and
  // once as a negative predictor, if a mask set overlaps).
  localparam int unsigned SCORE_W      = $clog2(2 * NUM_PIXELS + 1);   // 11
  localparam int unsigned DIGIT_W      = $clog2(NUM_DIGITS);           // 4

  typedef logic [NUM_PIXELS-1:0]                  bin_image_t;
  typedef logic [NUM_PIXELS-1:0]                  mask_t;
  typedef logic [NUM_DIGITS-1:0][NUM_PIXELS-1:0]  mask_set_t;
  typedef logic [SCORE_W-1:0]                     score_t;
  typedef logic [NUM_DIGITS-1:0][SCORE_W-1:0]     score_vec_t;
  typedef logic [DIGIT_W-1:0]                     digit_t;
  typedef logic [IMG_H-1:0][IMG_W-1:0][PIXEL_BITS-1:0] gray_image_t;

  // 8-bit quantized single-layer network: one signed 8-bit weight per pixel
  // and digit, accumulated over all 784 pixels.
  localparam int unsigned WEIGHT_W     = 8;
  localparam int unsigned ACC_W        = WEIGHT_W + $clog2(NUM_PIXELS) + 1;   // 18
  localparam int unsigned PIX_IDX_W    = $clog2(NUM_PIXELS);                  // 10
  localparam int unsigned QNN_CYCLES   = NUM_PIXELS + 1;                      // 785

  typedef logic signed [WEIGHT_W-1:0]                               weight_t;
  typedef logic signed [NUM_DIGITS-1:0][NUM_PIXELS-1:0][WEIGHT_W-1:0] weight_set_t;
  typedef logic signed [ACC_W-1:0]                                  acc_t;
  typedef logic [NUM_DIGITS-1:0][ACC_W-1:0]                         acc_vec_t;

  // Placeholder-mask generator constants (all coprime to 784 = 2^4 * 7^2).
  localparam int unsigned MASK_STRIDE [NUM_DIGITS] =
    '{97, 101, 103, 107, 109, 113, 127, 131, 137, 139};
  localparam int unsigned MASK_OFFSET [NUM_DIGITS] =
    '{11, 90, 173, 250, 331, 412, 489, 566, 645, 722};

  // Pixel index of the k-th predictor of digit d in the placeholder masks.
  function automatic int unsigned placeholder_pixel(int unsigned d, int unsigned k);
    return (MASK_STRIDE[d] * k + MASK_OFFSET[d]) % NUM_PIXELS;
  endfunction

  function automatic mask_set_t default_pos_masks();
    mask_set_t m = '0;
    for (int unsigned d = 0; d < NUM_DIGITS; d++)
      for (int unsigned k = 0; k < N_POS; k++)
        m[d][placeholder_pixel(d, k)] = 1'b1;
    return m;
  endfunction

  function automatic mask_set_t default_neg_masks();
    mask_set_t m = '0;
    for (int unsigned d = 0; d < NUM_DIGITS; d++)
      for (int unsigned k = N_POS; k < N_POS + N_NEG; k++)
        m[d][placeholder_pixel(d, k)] = 1'b1;
    return m;
  endfunction

  // Placeholder weights of the quantized network, covering the whole signed
  // 8-bit range: w[d][p] = ((37*d + 101*p + 13*d*p) mod 256) - 128.
  function automatic weight_set_t default_weights();
    weight_set_t w;
    for (int unsigned d = 0; d < NUM_DIGITS; d++)
      for (int unsigned p = 0; p < NUM_PIXELS; p++)
        w[d][p] = weight_t'(int'((37*d + 101*p + 13*d*p) % 256) - 128);
    return w;
  endfunction

endpackage
