// Maximum-value evaluator: the output stage of both classifiers.
//
// Compares N totals and returns the index of the largest one, together with
// its value. It replaces a softmax: only the position of the maximum matters
// for the decision, so no exponentials or divisions are needed. Totals are
// unsigned match counts in the binarized network and signed weight sums in
// the 8-bit quantized network (SIGNED = 1). When several totals share the
// maximum, the lowest index wins; that tie rule is this design's choice.
//
// Purely combinational: a chain of compare-and-select stages from index 0
// upwards.
module argmax
  import bnn_pkg::*;
#(
  parameter int unsigned N      = NUM_DIGITS,
  parameter int unsigned W      = SCORE_W,
  parameter bit          SIGNED = 1'b0,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] totals_i,   // totals_i[d] = total of digit d
  output logic [IDX_W-1:0]    digit_o,    // index of the largest total
  output logic [W-1:0]        max_o       // the largest total
);

  function automatic bit greater(logic [W-1:0] a, logic [W-1:0] b);
    if (SIGNED) return $signed(a) > $signed(b);
    else        return a > b;
  endfunction

  always_comb begin
    digit_o = '0;
    max_o   = totals_i[0];
    for (int unsigned d = 1; d < N; d++) begin
      if (greater(totals_i[d], max_o)) begin
        digit_o = IDX_W'(d);
        max_o   = totals_i[d];
      end
    end
  end

endmodule
