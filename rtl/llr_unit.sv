// llr_unit - symbol likelihoods T_k(a,b) of the double-binary max-log-MAP
// decoder, two-stage pipeline.
//
//   T_k(a,b) = max over the eight branches s -> s' with input (a,b) of
//              A_k(s) + G_k(s -> s') + B_{k+1}(s')
// Stage 1 adds the three metrics of all 32 branches and reduces each group of
// eight to two maxima of four; stage 2 takes the final maximum. The metrics
// may carry any per-step offset: only differences between the four T values
// are used later.
//
// Interface and timing: inputs sampled with valid_in; t (index a*2+b) and
// valid_out follow two cycles later. tag_in is carried along unchanged.
module llr_unit
  import ctc_pkg::*;
#(
  parameter int TAGW = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid_in,
  input  logic [TAGW-1:0] tag_in,
  input  sm_t             alpha [8],
  input  bm_t             gamma [16],
  input  sm_t             beta  [8],
  output logic            valid_out,
  output logic [TAGW-1:0] tag_out,
  output tl_t             t     [4]
);
  tl_t  part [4][2];
  logic v1;
  logic [TAGW-1:0] tag1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; valid_out <= 1'b0; tag1 <= '0; tag_out <= '0;
      for (int u = 0; u < 4; u++) begin
        t[u] <= '0; part[u][0] <= '0; part[u][1] <= '0;
      end
    end else begin
      v1        <= valid_in;
      valid_out <= v1;
      tag1      <= tag_in;
      tag_out   <= tag1;
      // stage 1: branch sums, two partial maxima per symbol value
      for (int u = 0; u < 4; u++) begin
        for (int h = 0; h < 2; h++) begin
          tl_t best, sum;
          best = {1'b1, {(TW-1){1'b0}}};
          for (int s = h*4; s < h*4 + 4; s++) begin
            state_t     nx;
            logic [1:0] yw;
            nx  = enc_next(3'(s), u[1], u[0]);
            yw  = enc_par(3'(s), u[1], u[0]);
            sum = tl_t'(alpha[s]) + tl_t'(gamma[u*4 + int'(yw)]) + tl_t'(beta[nx]);
            if (sum > best) best = sum;
          end
          part[u][h] <= best;
        end
      end
      // stage 2: final maximum
      for (int u = 0; u < 4; u++)
        t[u] <= (part[u][0] > part[u][1]) ? part[u][0] : part[u][1];
    end
  end
endmodule
