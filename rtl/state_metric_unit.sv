// state_metric_unit - one step of the forward (ALPHA) or backward (BETA)
// state metric recursion of the max-log-MAP decoder, with normalisation to
// state 0.
//
// Forward:  A_k(j) = max over the four branches i -> j of
//                    A_{k-1}(i) + G(i -> j) - A_{k-1}(0)
// Backward: B_k(i) = max over the four branches i -> j of
//                    B_{k+1}(j) + G(i -> j) - B_{k+1}(0)
// The previous metrics are forwarded un-normalised and the subtraction of the
// state-0 metric is folded into the add stage (a three-operand add, i.e. one
// carry-save level and one carry-propagate adder ahead of compare-select),
// so no separate normalisation stage sits in the recursion loop. The result
// is saturated to the 8-bit metric width.
//
// Interface and timing: combinational; the caller registers m_out.
// Parameter BACKWARD selects the recursion direction.
module state_metric_unit
  import ctc_pkg::*;
#(
  parameter bit BACKWARD = 1'b0
) (
  input  sm_t m_in  [8],
  input  bm_t gamma [16],
  output sm_t m_out [8]
);
  always_comb begin
    logic signed [SMW+1:0] best [8];
    logic signed [SMW+1:0] cand;
    for (int s = 0; s < 8; s++) best[s] = {2'b10, {SMW{1'b0}}};   // most negative
    for (int i = 0; i < 8; i++) begin
      for (int ab = 0; ab < 4; ab++) begin
        state_t     j;
        logic [1:0] yw;
        int         lbl;
        j   = enc_next(3'(i), ab[1], ab[0]);
        yw  = enc_par(3'(i), ab[1], ab[0]);
        lbl = ab * 4 + int'(yw);
        if (!BACKWARD) begin
          cand = (SMW+2)'(m_in[i]) + (SMW+2)'(gamma[lbl]) - (SMW+2)'(m_in[0]);
          if (cand > best[j]) best[j] = cand;
        end else begin
          cand = (SMW+2)'(m_in[j]) + (SMW+2)'(gamma[lbl]) - (SMW+2)'(m_in[0]);
          if (cand > best[i]) best[i] = cand;
        end
      end
    end
    for (int s = 0; s < 8; s++) m_out[s] = sm_t'(sat(16'(best[s]), SMW));
  end
endmodule
