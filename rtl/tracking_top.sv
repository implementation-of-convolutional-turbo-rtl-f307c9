// tracking_top - timing (sampling clock) and residual carrier frequency
// tracking for one 1024-point FUSC OFDM symbol in the frequency domain.
//
// Data flow:
//   1. S_IN: the 1024 subcarriers arrive in index order -512..511 and are
//      written to a symbol buffer (1024 x 16 bits). Pilot subcarriers (from
//      the internal FUSC pilot-position function, even/odd symbol aware) go
//      through pilot_phase_est (CORDIC vectoring) and phase_coef
//      (truncated-array MAC for the slope, accumulator for the intercept).
//   2. S_DRAIN: wait until the last pilot angle has left the CORDIC pipeline,
//      then latch a and b; add_drop_ctrl decides rob/stuff for the next
//      cyclic prefix removal.
//   3. S_OUT: data_phase_est generates phi(k) = a*k + b for every subcarrier
//      while the buffer is read in order, and subcarrier_derot (CORDIC
//      rotation) removes it.
// The single-buffer, stop-and-go schedule (in_ready low during drain and
// output) is this design's choice; the document pipelines the blocks without
// giving a buffer organisation.
//
// Interface and timing: in_valid/in_ready handshake, the first sample of a
// symbol flagged by in_first with in_odd giving the symbol parity and
// in_pilot_neg the pilot value (-1) at that subcarrier. Output samples come
// with out_valid and out_idx; the first corrected sample leaves about 30
// cycles after the last input sample, then one per cycle. A symbol takes
// 1024 + 1024 + ~30 cycles.
module tracking_top
  import trk_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_first,
  input  logic   in_odd,
  input  logic   in_pilot_neg,
  input  samp_t  in_re,
  input  samp_t  in_im,
  output logic   in_ready,
  output logic   out_valid,
  output samp_t  out_re,
  output samp_t  out_im,
  output sidx_t  out_idx,
  output logic   coef_valid,
  output slope_t a_coef,
  output ang_t   b_coef,
  output logic   rob,
  output logic   stuff
);
  typedef enum logic [1:0] {S_IN, S_DRAIN, S_OUT} st_t;
  localparam int DRAIN_CYC = 14;

  st_t   st;
  sidx_t k_in;
  logic  odd_q;
  logic [4:0] drain_cnt;
  localparam int FFT_N = 1024;
  logic [15:0] buf_mem [FFT_N];
  logic adc_valid;

  logic  acc_in;
  sidx_t k_cur;
  logic  odd_cur;
  assign in_ready = (st == S_IN);
  assign acc_in   = in_valid && in_ready;
  assign k_cur    = in_first ? sidx_t'(-512) : k_in;
  assign odd_cur  = in_first ? in_odd : odd_q;

  // pilot path
  logic  pv;
  ang_t  p_ang;
  samp_t p_mag;
  sidx_t p_idx;
  pilot_phase_est u_pilot (
    .clk, .rst_n, .valid_in(acc_in), .pilot_flag(is_pilot(k_cur, odd_cur)),
    .pilot_neg(in_pilot_neg), .rx_re(in_re), .rx_im(in_im), .idx_in(k_cur),
    .valid_out(pv), .angle(p_ang), .mag(p_mag), .idx_out(p_idx)
  );

  logic finish, clear;
  assign clear  = acc_in && in_first;
  assign finish = (st == S_DRAIN) && (drain_cnt == 5'(DRAIN_CYC - 1));

  phase_coef u_coef (
    .clk, .rst_n, .clear, .valid_in(pv), .k(p_idx), .phi(p_ang), .finish,
    .coef_valid, .a_coef, .b_coef
  );

  add_drop_ctrl u_adc (
    .clk, .rst_n, .coef_valid, .a_coef, .valid_out(adc_valid), .rob, .stuff
  );

  // output path
  logic  dp_valid, dp_last;
  sidx_t dp_idx;
  ang_t  dp_phase;
  logic  out_run;
  data_phase_est u_dpe (
    .clk, .rst_n, .start(coef_valid), .a_coef, .b_coef, .en(out_run),
    .valid_out(dp_valid), .last(dp_last), .idx(dp_idx), .phase(dp_phase)
  );

  logic [15:0] rd_word;
  logic [9:0]  rd_addr;
  assign rd_addr = 10'(dp_idx) ^ 10'h200;
  assign rd_word = buf_mem[rd_addr];

  subcarrier_derot u_derot (
    .clk, .rst_n, .valid_in(dp_valid),
    .rx_re(samp_t'(rd_word[15:8])), .rx_im(samp_t'(rd_word[7:0])),
    .phase(dp_phase), .idx_in(dp_idx),
    .valid_out(out_valid), .out_re, .out_im, .idx_out(out_idx)
  );

  always_ff @(posedge clk) begin
    if (acc_in) buf_mem[10'(k_cur) ^ 10'h200] <= {in_re, in_im};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IN; k_in <= sidx_t'(-512); odd_q <= 1'b0; drain_cnt <= '0; out_run <= 1'b0;
    end else begin
      case (st)
        S_IN: if (acc_in) begin
          k_in  <= k_cur + 1'b1;
          odd_q <= odd_cur;
          if (k_cur == sidx_t'(511)) begin
            st <= S_DRAIN; drain_cnt <= '0;
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (finish) st <= S_OUT;
        end
        default: begin
          if (coef_valid) out_run <= 1'b1;
          if (dp_valid && dp_last) begin
            out_run <= 1'b0;
            st      <= S_IN;
            k_in    <= sidx_t'(-512);
          end
        end
      endcase
    end
  end

  logic unused;
  assign unused = ^p_mag ^ adc_valid;
endmodule
