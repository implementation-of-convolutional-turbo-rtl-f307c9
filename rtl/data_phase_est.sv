// data_phase_est - phase estimate for every subcarrier of the symbol,
// phi(k) = a*k + b, from the slope and intercept of phase_coef.
//
// The subcarrier index k runs from -512 to 511; a carries two fraction bits,
// so phi = ((a*k) >>> 2) + b, wrapping modulo 2*pi in the angle format. One
// multiplier by a 5-bit constant and one adder per cycle.
//
// Interface and timing: start loads a, b and restarts k at -512; every cycle
// with en produces the next (k, phi) on the registered outputs, valid_out one
// cycle later; last marks k = 511.
module data_phase_est
  import trk_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  slope_t a_coef,
  input  ang_t   b_coef,
  input  logic   en,
  output logic   valid_out,
  output logic   last,
  output sidx_t  idx,
  output ang_t   phase
);
  slope_t a_q;
  ang_t   b_q;
  sidx_t  k;
  logic   run;
  logic signed [IW+AW_C-1:0] prod;

  assign prod = (IW+AW_C)'(a_q) * (IW+AW_C)'(k);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; k <= '0; run <= 1'b0;
      valid_out <= 1'b0; last <= 1'b0; idx <= '0; phase <= '0;
    end else begin
      valid_out <= 1'b0;
      last      <= 1'b0;
      if (start) begin
        a_q <= a_coef; b_q <= b_coef;
        k   <= sidx_t'(-512);
        run <= 1'b1;
      end else if (run && en) begin
        valid_out <= 1'b1;
        last      <= (k == sidx_t'(511));
        idx       <= k;
        phase     <= ang_t'(prod >>> 2) + b_q;
        k         <= k + 1'b1;
        if (k == sidx_t'(511)) run <= 1'b0;
      end
    end
  end
endmodule
