// 8-bit quantized single-layer MNIST digit classifier, one pixel per clock.
//
// Each digit owns 784 signed 8-bit weights. Because the input image is
// binary, multiplying a pixel by its weight is an AND: a lit pixel passes the
// weight, a dark pixel passes zero. The classifier walks over the pixels,
// one per clock, and adds the selected weight of the current pixel into all
// ten digit accumulators at once. After the last pixel a maximum-value
// evaluator picks the digit whose sum is largest.
//
// Timing: a start pulse while idle clears the accumulators. The next 784
// clocks accumulate pixels 0..783 and the clock after that registers the
// decision and raises done for one cycle: done follows start by 785 clocks.
// The image must stay stable at img_i while busy is high (no copy of it is
// kept); start while busy is ignored. The weights are a parameter, so they
// end up as constant tables read by the pixel index; the default is a
// placeholder pattern (see bnn_pkg). The start/busy/done handshake, the
// 18-bit accumulators and the reset values are this design's choices.
module quant_classifier
  import bnn_pkg::*;
#(
  parameter weight_set_t WEIGHTS = default_weights()
) (
  input  logic       clk,
  input  logic       rst_n,
  input  bin_image_t img_i,     // binary image, held while busy
  input  logic       start_i,   // begin a classification (ignored while busy)
  output logic       busy_o,    // accumulating
  output logic       done_o,    // one-cycle pulse: digit_o and sums_o are new
  output acc_vec_t   sums_o,    // per-digit weighted sums (signed)
  output digit_t     digit_o    // decision, held until the next done
);

  typedef enum logic [1:0] {IDLE, ACCUM, DECIDE} state_e;

  state_e                 state;
  logic [PIX_IDX_W-1:0]   idx;
  acc_vec_t               acc;
  digit_t                 best;
  acc_t                   best_sum;   // not needed for the decision

  argmax #(.N(NUM_DIGITS), .W(ACC_W), .SIGNED(1'b1)) u_argmax (
    .totals_i (acc),
    .digit_o  (best),
    .max_o    (best_sum)
  );

  // Sign-extended weight of digit d at pixel p.
  function automatic acc_t weight_ext(int d, logic [PIX_IDX_W-1:0] p);
    weight_t w = WEIGHTS[d][p];
    return acc_t'(w);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      idx     <= '0;
      acc     <= '0;
      digit_o <= '0;
      done_o  <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        IDLE: if (start_i) begin
          acc   <= '0;
          idx   <= '0;
          state <= ACCUM;
        end
        ACCUM: begin
          for (int d = 0; d < NUM_DIGITS; d++)
            if (img_i[idx])
              acc[d] <= acc_t'(acc[d]) + weight_ext(d, idx);
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

  assign busy_o = (state != IDLE);
  assign sums_o = acc;

  // A classification takes exactly NUM_PIXELS accumulate cycles and one decide.
  a_done_after_decide: assert property (@(posedge clk) disable iff (!rst_n)
    done_o |-> $past(state) == DECIDE);
  a_idx_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    idx < PIX_IDX_W'(NUM_PIXELS));

endmodule
