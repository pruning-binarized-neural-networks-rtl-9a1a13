// Binarized single-layer classifier in its sequential form: one pixel per
// clock.
//
// The same network as bnn_classifier: each digit has a 784-bit positive and
// a 784-bit negative predictor mask, and a pixel counts for the digit when it
// is lit at a positive predictor or dark at a negative one. Here the pixel
// index is stepped through the image, one pixel per clock, and all ten
// digit counters are updated in parallel from the mask bits at that index.
// After the last pixel the counts are compared and the largest wins (lowest
// index on a tie). This is the direct form of the network before its masks
// are merged into one combinational path; it needs one small counter per
// digit instead of ten adder trees, at the cost of 785 clocks per image.
//
// Timing and handshake are the same as quant_classifier: start_i while idle
// clears the counters, 784 clocks count pixels 0..783, and the next clock
// registers the decision and pulses done_o, 785 clocks after start. img_i
// must stay stable while busy_o is high; start_i while busy is ignored. The
// masks are parameters (constant 784-bit words). The handshake, counter
// widths and reset values are this design's choices.
module bnn_serial_classifier
  import bnn_pkg::*;
#(
  parameter mask_set_t POS_MASKS = default_pos_masks(),
  parameter mask_set_t NEG_MASKS = default_neg_masks()
) (
  input  logic       clk,
  input  logic       rst_n,
  input  bin_image_t img_i,     // binary image, held while busy
  input  logic       start_i,   // begin a classification (ignored while busy)
  output logic       busy_o,    // counting
  output logic       done_o,    // one-cycle pulse: digit_o and totals_o are new
  output score_vec_t totals_o,  // per-digit match counts
  output digit_t     digit_o    // decision, held until the next done
);

  typedef enum logic [1:0] {IDLE, COUNT, DECIDE} state_e;

  state_e               state;
  logic [PIX_IDX_W-1:0] idx;
  score_vec_t           cnt;
  digit_t               best;
  score_t               best_total;   // not needed for the decision

  argmax #(.N(NUM_DIGITS), .W(SCORE_W), .SIGNED(1'b0)) u_argmax (
    .totals_i (cnt),
    .digit_o  (best),
    .max_o    (best_total)
  );

  // Matches of digit d at the current pixel: 0, 1, or 2 if the masks overlap.
  function automatic score_t pixel_hits(int d, logic [PIX_IDX_W-1:0] p, logic px);
    logic hit_pos = POS_MASKS[d][p] && px;
    logic hit_neg = NEG_MASKS[d][p] && !px;
    return score_t'(hit_pos) + score_t'(hit_neg);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      idx     <= '0;
      cnt     <= '0;
      digit_o <= '0;
      done_o  <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        IDLE: if (start_i) begin
          cnt   <= '0;
          idx   <= '0;
          state <= COUNT;
        end
        COUNT: begin
          for (int d = 0; d < NUM_DIGITS; d++)
            cnt[d] <= cnt[d] + pixel_hits(d, idx, img_i[idx]);
          if (idx == PIX_IDX_W'(NUM_PIXELS - 1)) state <= DECIDE;
          else                                   idx   <= idx + 1'b1;
        end
        DECIDE: begin
          digit_o <= best;
          done_o  <= 1'b1;
          state   <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy_o   = (state != IDLE);
  assign totals_o = cnt;

  a_done_after_decide: assert property (@(posedge clk) disable iff (!rst_n)
    done_o |-> $past(state) == DECIDE);
  a_idx_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    idx < PIX_IDX_W'(NUM_PIXELS));

endmodule
