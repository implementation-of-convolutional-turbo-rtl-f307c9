// subcarrier_derot - removes the estimated phase of a subcarrier:
// out = in * exp(-j*phi), with a CORDIC in rotation mode driven by -phi.
//
// Interface and timing: one sample per cycle with valid_in; the corrected
// sample leaves 10 cycles later with valid_out, with its index.
module subcarrier_derot
  import trk_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid_in,
  input  samp_t rx_re,
  input  samp_t rx_im,
  input  ang_t  phase,
  input  sidx_t idx_in,
  output logic  valid_out,
  output samp_t out_re,
  output samp_t out_im,
  output sidx_t idx_out
);
  ang_t z_res;
  logic [IW-1:0] tag;

  cordic #(.TAGW(IW)) u_cordic (
    .clk, .rst_n, .valid_in, .mode(CORDIC_ROTATE),
    .real_in(rx_re), .imag_in(rx_im), .z_in(-phase), .tag_in(idx_in),
    .valid_out, .real_out(out_re), .imag_out(out_im), .z_out(z_res), .tag_out(tag)
  );
  assign idx_out = sidx_t'(tag);

  logic unused;
  assign unused = ^z_res;   // residual angle of the rotation, not needed
endmodule
