// phase_coef - least-squares fit of the pilot phases, phi(k) = a*k + b.
//
// The document's simplified estimator uses the fact that the pilot index sums
// are nearly zero and the sum of squares is nearly 2^22:
//   a ~ sum(k*phi) / 2^22,        b ~ sum(phi) * (1/128 + 1/256) (~ /82).
// sum(k*phi) is formed with a multiply-accumulate whose 10x10 signed
// multiplier is a truncated Baugh-Wooley partial-product array: only the
// columns 10..19 are summed (columns below N2 = 10 are dropped), the
// correction constant 2^10 plus ones in columns 19..24 turns the array into
// a sign-extended 25-bit product, and the 25-bit accumulator keeps the top
// five bits as the slope a (two fraction bits, units of pi/512 per
// subcarrier). sum(phi) uses a plain accumulator.
// The word lengths (10-bit operands, 25-bit accumulator, 5-bit a) and the
// constant follow the document's figures; the rounding of b is this design's.
//
// Interface and timing: clear starts a new symbol; each valid_in adds one
// pilot (index k, angle phi); finish (after the last pilot has been added,
// or in the same cycle) produces a_coef/b_coef with coef_valid one cycle
// later.
module phase_coef
  import trk_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   valid_in,
  input  sidx_t  k,
  input  ang_t   phi,
  input  logic   finish,
  output logic   coef_valid,
  output slope_t a_coef,
  output ang_t   b_coef
);
  localparam int N2  = 10;
  localparam int ACW = 25;
  localparam int SW  = 17;

  // truncated Baugh-Wooley product of two 10-bit signed numbers, mod 2^25
  function automatic logic [ACW-1:0] trunc_mul(input logic [9:0] x, input logic [9:0] y);
    logic [ACW-1:0] s;
    logic           bit_v;
    s = ACW'(1 << N2) + ACW'(((1 << 6) - 1) << 19);
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++)
        if (i + j >= N2) begin
          if ((i == 9) ^ (j == 9)) bit_v = !(x[i] & y[j]);
          else                     bit_v = x[i] & y[j];
          if (bit_v) s = s + (ACW'(1) << (i + j));
        end
    return s;
  endfunction

  logic [ACW-1:0]       acc;
  logic signed [SW-1:0] sum_phi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; sum_phi <= '0;
      coef_valid <= 1'b0; a_coef <= '0; b_coef <= '0;
    end else begin
      coef_valid <= finish;
      if (finish) begin
        logic [ACW-1:0]       acc_f;
        logic signed [SW-1:0] s_f;
        acc_f = acc;
        s_f   = sum_phi;
        if (valid_in) begin
          acc_f = acc_f + trunc_mul(k, phi);
          s_f   = s_f + SW'(phi);
        end
        a_coef <= slope_t'(acc_f[ACW-1 -: AW_C]);
        b_coef <= ang_t'((s_f >>> 7) + (s_f >>> 8));
      end
      if (clear) begin
        acc <= '0; sum_phi <= '0;
      end else if (valid_in) begin
        acc     <= acc + trunc_mul(k, phi);
        sum_phi <= sum_phi + SW'(phi);
      end
    end
  end
endmodule
