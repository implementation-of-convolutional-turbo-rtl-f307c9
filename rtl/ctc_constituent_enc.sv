// ctc_constituent_enc - double-binary recursive systematic convolutional
// encoder, the constituent code of the 802.16e CTC.
//
// Three flip-flops S1 S2 S3 and four XOR nodes implement feedback 1+D+D^3,
// parity Y = 1+D^2+D^3 and parity W = 1+D^3 (equations in ctc_pkg). Input A
// enters the feedback node only; input B also enters the nodes in front of
// S2 and S3.
//
// Interface and timing: one couple (a, b) per cycle when valid_in is high.
// Outputs y, w are registered and appear with valid_out one cycle after the
// couple. init loads init_stat (the circulation state) into the registers;
// when init and valid_in are high together the couple is encoded from
// init_stat, so blocks can follow each other without a gap. state is the
// current register content (the final state after the last couple).
// Reset is asynchronous and active low, as in the description of the block;
// the choice of polarity is this design's.
module ctc_constituent_enc
  import ctc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init,
  input  state_t init_stat,
  input  logic   valid_in,
  input  logic   a,
  input  logic   b,
  output logic   y,
  output logic   w,
  output logic   valid_out,
  output state_t state
);
  state_t s_cur;
  assign s_cur = init ? init_stat : state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      y         <= 1'b0;
      w         <= 1'b0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        state  <= enc_next(s_cur, a, b);
        {y, w} <= enc_par(s_cur, a, b);
      end else begin
        state <= s_cur;
      end
    end
  end
endmodule
