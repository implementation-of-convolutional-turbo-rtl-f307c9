// extrinsic_unit - extrinsic likelihoods and hard decisions of the
// double-binary max-log-MAP decoder.
//
//   Le_o(0,1) = T(0,1) - T(0,0) - R_B - Le(0,1)
//   Le_o(1,0) = T(1,0) - T(0,0) - R_A - Le(1,0)
//   Le_o(1,1) = T(1,1) - T(0,0) - R_A - R_B - Le(1,1)
// The normalisation by T(0,0) is merged into the same multi-operand
// subtraction, and each result saturates to the 6-bit extrinsic range
// [-32, 31]. The systematic-plus-a-priori terms arrive as the stored branch
// metrics G{0100}, G{1000}, G{1100}, which hold exactly those sums. Hard
// decisions: A = 1 when max(T10, T11) > max(T00, T01), B = 1 when
// max(T01, T11) > max(T00, T10).
//
// Interface and timing: inputs sampled with valid_in, results registered one
// cycle later with valid_out; tag_in is carried along.
module extrinsic_unit
  import ctc_pkg::*;
#(
  parameter int TAGW = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid_in,
  input  logic [TAGW-1:0] tag_in,
  input  tl_t             t    [4],
  input  bm_t             g01,      // R_B + Le(0,1)
  input  bm_t             g10,      // R_A + Le(1,0)
  input  bm_t             g11,      // R_A + R_B + Le(1,1)
  output logic            valid_out,
  output logic [TAGW-1:0] tag_out,
  output le_t             le01,
  output le_t             le10,
  output le_t             le11,
  output logic            a_hat,
  output logic            b_hat
);
  logic signed [15:0] e01, e10, e11;
  tl_t ma1, ma0, mb1, mb0;

  always_comb begin
    e01 = 16'(t[1]) - 16'(t[0]) - 16'(g01);
    e10 = 16'(t[2]) - 16'(t[0]) - 16'(g10);
    e11 = 16'(t[3]) - 16'(t[0]) - 16'(g11);
    ma1 = (t[2] > t[3]) ? t[2] : t[3];
    ma0 = (t[0] > t[1]) ? t[0] : t[1];
    mb1 = (t[1] > t[3]) ? t[1] : t[3];
    mb0 = (t[0] > t[2]) ? t[0] : t[2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0; tag_out <= '0; le01 <= '0; le10 <= '0; le11 <= '0;
      a_hat <= 1'b0; b_hat <= 1'b0;
    end else begin
      valid_out <= valid_in;
      tag_out   <= tag_in;
      le01      <= le_t'(sat(e01, LEW));
      le10      <= le_t'(sat(e10, LEW));
      le11      <= le_t'(sat(e11, LEW));
      a_hat     <= (ma1 > ma0);
      b_hat     <= (mb1 > mb0);
    end
  end
endmodule
