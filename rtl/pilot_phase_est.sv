// pilot_phase_est - phase of each received pilot subcarrier.
//
// The known BPSK pilot value is removed first (the sample is negated when the
// transmitted pilot is -1), then a CORDIC in vectoring mode returns the angle
// of the remaining complex value: the phase error of that pilot caused by the
// residual carrier frequency offset and the sampling clock offset.
// The sign removal before the CORDIC is this design's choice; the document
// divides the angle by the pilot value after estimating it.
//
// Interface and timing: a sample is taken when valid_in and pilot_flag are
// both high; its angle appears 11 cycles later with valid_out, tagged with
// the subcarrier index it came from. Non-pilot samples are ignored.
module pilot_phase_est
  import trk_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid_in,
  input  logic  pilot_flag,
  input  logic  pilot_neg,     // transmitted pilot value is -1
  input  samp_t rx_re,
  input  samp_t rx_im,
  input  sidx_t idx_in,
  output logic  valid_out,
  output ang_t  angle,
  output samp_t mag,
  output sidx_t idx_out
);
  logic  v1;
  samp_t re1, im1;
  sidx_t i1;

  function automatic samp_t neg_sat(input samp_t v);
    return (v == samp_t'(-128)) ? samp_t'(127) : -v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; re1 <= '0; im1 <= '0; i1 <= '0;
    end else begin
      v1 <= valid_in && pilot_flag;
      if (valid_in && pilot_flag) begin
        re1 <= pilot_neg ? neg_sat(rx_re) : rx_re;
        im1 <= pilot_neg ? neg_sat(rx_im) : rx_im;
        i1  <= idx_in;
      end
    end
  end

  samp_t unused_im;
  logic [IW-1:0] tag;

  cordic #(.TAGW(IW)) u_cordic (
    .clk, .rst_n, .valid_in(v1), .mode(CORDIC_VECTOR),
    .real_in(re1), .imag_in(im1), .z_in('0), .tag_in(i1),
    .valid_out, .real_out(mag), .imag_out(unused_im), .z_out(angle), .tag_out(tag)
  );
  assign idx_out = sidx_t'(tag);
endmodule
