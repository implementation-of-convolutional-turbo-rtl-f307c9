// add_drop_ctrl - sample add/drop decision for the sampling clock offset.
//
// The phase difference between the outermost subcarriers is a*1023 (in
// pi/512 units, a with two fraction bits, so a*1023/4). When it reaches +pi
// the receiver samples too late and one sample is robbed (the next cyclic
// prefix removal takes one sample less); at -pi one sample is stuffed (one
// more). Comparing the accumulated phase slope against pi follows the
// document; the exact threshold arithmetic is this design's.
//
// Interface and timing: decision registered one cycle after coef_valid;
// rob and stuff are one-cycle pulses, never both.
module add_drop_ctrl
  import trk_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   coef_valid,
  input  slope_t a_coef,
  output logic   valid_out,
  output logic   rob,
  output logic   stuff
);
  logic signed [16:0] span;
  assign span = 17'(a_coef) * 17'sd1023;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0; rob <= 1'b0; stuff <= 1'b0;
    end else begin
      valid_out <= coef_valid;
      rob       <= coef_valid && (span >= 17'sd2048);
      stuff     <= coef_valid && (span <= -17'sd2048);
    end
  end
endmodule
