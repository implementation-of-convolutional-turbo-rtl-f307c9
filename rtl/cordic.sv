// cordic - pipelined radix-2 CORDIC with eight iterations, rotation or
// vectoring mode.
//
// A pre-rotation by pi brings every case inside the convergence range of the
// eight micro-rotations (about +-99 degrees): in vectoring mode a vector with
// negative real part is negated and pi added to its angle; in rotation mode
// a target angle beyond +-pi/2 is reduced by pi and the vector negated.
// Eight cordic_stage instances with fixed iteration numbers 0..7 follow,
// and a final stage removes the CORDIC gain K = 1.6468 by multiplying with
// 1/K ~ 2^-1 + 2^-3 - 2^-6 - 2^-9 (shift and add) and rounds back to the
// 8-bit sample width with saturation.
//
// Rotation mode:  out = in * exp(j * z_in), z_out ~ 0.
// Vectoring mode: out ~ (|in|, 0), z_out = z_in + angle(in).
//
// Interface and timing: one sample per cycle with valid_in; results after
// 10 cycles with valid_out. tag_in travels with the sample.
module cordic
  import trk_pkg::*;
#(
  parameter int TAGW = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid_in,
  input  cordic_mode_t    mode,
  input  samp_t           real_in,
  input  samp_t           imag_in,
  input  ang_t            z_in,
  input  logic [TAGW-1:0] tag_in,
  output logic            valid_out,
  output samp_t           real_out,
  output samp_t           imag_out,
  output ang_t            z_out,
  output logic [TAGW-1:0] tag_out
);
  localparam ang_t HALF_PI = ang_t'(1 << (ZW - 2));
  localparam ang_t PI      = {1'b1, {(ZW-1){1'b0}}};

  // stage 0: pre-rotation
  logic         v0;
  cordic_mode_t m_pipe [NITER+1];
  logic [TAGW-1:0] t_pipe [NITER+1];
  cx_t          x0, y0;
  ang_t         z0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0; x0 <= '0; y0 <= '0; z0 <= '0;
      m_pipe[0] <= CORDIC_ROTATE; t_pipe[0] <= '0;
    end else begin
      v0 <= valid_in;
      if (valid_in) begin
        cx_t  xi, yi;
        logic flip;
        xi = cx_t'(real_in) <<< 2;
        yi = cx_t'(imag_in) <<< 2;
        if (mode == CORDIC_VECTOR) flip = real_in[DW-1];
        else                       flip = (z_in > HALF_PI) || (z_in < -HALF_PI);
        x0 <= flip ? -xi : xi;
        y0 <= flip ? -yi : yi;
        if (mode == CORDIC_VECTOR) z0 <= flip ? z_in + PI : z_in;
        else                       z0 <= flip ? z_in - PI : z_in;
        m_pipe[0] <= mode;
        t_pipe[0] <= tag_in;
      end
    end
  end

  logic v   [NITER+1];
  cx_t  xs  [NITER+1];
  cx_t  ys  [NITER+1];
  ang_t zs  [NITER+1];
  assign v[0]  = v0;
  assign xs[0] = x0;
  assign ys[0] = y0;
  assign zs[0] = z0;

  for (genvar i = 0; i < NITER; i++) begin : g_stage
    cordic_stage u_stage (
      .clk, .rst_n, .valid_in(v[i]), .mode(m_pipe[i]), .iter_no(3'(i)),
      .real_in(xs[i]), .imag_in(ys[i]), .z_in(zs[i]),
      .valid_out(v[i+1]), .real_out(xs[i+1]), .imag_out(ys[i+1]), .z_out(zs[i+1])
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        m_pipe[i+1] <= CORDIC_ROTATE; t_pipe[i+1] <= '0;
      end else if (v[i]) begin
        m_pipe[i+1] <= m_pipe[i]; t_pipe[i+1] <= t_pipe[i];
      end
    end
  end

  // gain correction and rounding
  function automatic samp_t scale(input cx_t v_in);
    logic signed [XW+9:0] w, r;
    w = (XW+10)'(v_in) <<< 9;
    r = (w >>> 1) + (w >>> 3) - (w >>> 6) - (w >>> 9);   // * 0.6074
    r = (r + (XW+10)'(1 <<< 10)) >>> 11;                  // drop 9 + 2 fraction bits, round
    if (r > (XW+10)'(127))  return samp_t'(127);
    if (r < -(XW+10)'(128)) return samp_t'(-128);
    return samp_t'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0; real_out <= '0; imag_out <= '0; z_out <= '0; tag_out <= '0;
    end else begin
      valid_out <= v[NITER];
      if (v[NITER]) begin
        real_out <= scale(xs[NITER]);
        imag_out <= scale(ys[NITER]);
        z_out    <= zs[NITER];
        tag_out  <= t_pipe[NITER];
      end
    end
  end
endmodule
