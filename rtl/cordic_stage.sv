// cordic_stage - one radix-2 CORDIC iteration (the CORDIC unit).
//
// Pseudo-rotation by d * arctan(2^-i):
//   x' = x - d * (y >>> i),  y' = y + d * (x >>> i),  z' = z - d * arctan(2^-i)
// Rotation mode drives the residual angle z to zero: d = +1 when z >= 0.
// Vectoring mode drives y to zero: d is the XOR of the signs of x and y
// (d = -1 when they agree, +1 otherwise), so z accumulates the vector angle.
// The shift amount comes from iter_no, so the same unit can be reused for
// all iterations or instantiated once per pipeline stage.
//
// Interface and timing: inputs sampled with valid_in; outputs registered,
// valid_out one cycle later.
module cordic_stage
  import trk_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_in,
  input  cordic_mode_t mode,
  input  logic [2:0]   iter_no,
  input  cx_t          real_in,
  input  cx_t          imag_in,
  input  ang_t         z_in,
  output logic         valid_out,
  output cx_t          real_out,
  output cx_t          imag_out,
  output ang_t         z_out
);
  logic d_pos;     // d = +1
  cx_t  xs, ys;
  ang_t at;

  assign d_pos = (mode == CORDIC_VECTOR) ? (real_in[XW-1] ^ imag_in[XW-1]) : !z_in[ZW-1];
  assign xs    = real_in >>> iter_no;
  assign ys    = imag_in >>> iter_no;
  assign at    = atan_tab(int'(iter_no));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0; real_out <= '0; imag_out <= '0; z_out <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        real_out <= d_pos ? real_in - ys : real_in + ys;
        imag_out <= d_pos ? imag_in + xs : imag_in - xs;
        z_out    <= d_pos ? z_in - at : z_in + at;
      end
    end
  end
endmodule
