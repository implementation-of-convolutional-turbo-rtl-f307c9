// ctc_interleaver - CTC interleaver of the 802.16e turbo encoder.
//
// Stage 1 swaps A and B of every odd couple (two multiplexers whose select
// toggles at the couple rate). Stage 2 reorders a whole block: the swapped
// couples are written at linear addresses into one of two RAM banks, and when
// the block is complete it is read back at the interleaved addresses P(j)
// from ctc_intlv_addr_gen while the next block fills the other bank, so
// U2(j) = U1(P(j)).
//
// Interface and timing: one couple per cycle with valid_in; start marks the
// first couple of a block and carries blk_id. The interleaved block leaves at
// one couple per cycle on a_out/b_out with valid_out, start_out on its first
// couple; its first couple appears 3 cycles after the last input couple.
// ready tells the source whether a couple may be sent: it drops while the
// bank that would be written is still being read, which happens only when a
// block is shorter than the one before it (the completed block then waits,
// pending, for the read of the longer one to finish). Equal-size blocks
// stream without gaps.
module ctc_interleaver
  import ctc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  blk_id_t blk_id,
  input  logic    valid_in,
  input  logic    a,
  input  logic    b,
  output logic    ready,
  output logic    valid_out,
  output logic    start_out,
  output blk_id_t blk_id_out,
  output logic    a_out,
  output logic    b_out
);
  logic [1:0] mem [2][NMAX];

  // write side
  idx_t    wcnt;
  logic    wbank;
  blk_id_t wblk;
  idx_t    wn;
  idx_t    wa;
  blk_id_t cur_blk;
  logic    a1, b1;

  assign cur_blk = start ? blk_id : wblk;
  assign wa      = start ? '0 : wcnt;
  assign wn      = KW'(blk_n(cur_blk) - 1);
  // stage 1: swap odd couples
  assign a1 = wa[0] ? b : a;
  assign b1 = wa[0] ? a : b;

  logic wr_last;
  assign wr_last = valid_in && (wa == wn);

  always_ff @(posedge clk) begin
    if (valid_in) mem[wbank][wa] <= {a1, b1};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt  <= '0;
      wbank <= 1'b0;
      wblk  <= '0;
    end else if (valid_in) begin
      wblk <= cur_blk;
      if (wr_last) begin
        wcnt  <= '0;
        wbank <= ~wbank;
      end else begin
        wcnt <= wa + 1'b1;
      end
    end
  end

  // read side
  logic    rd_bank, step_bank, ag_valid, ag_last;
  blk_id_t rd_blk, step_blk;
  logic [KW:0] rd_left;
  logic    step;
  idx_t    ag_lin, ag_int;
  logic    pend, pend_bank;
  blk_id_t pend_blk;
  logic    rd_free, go;
  blk_id_t go_blk;

  assign step    = (rd_left != 0);
  assign rd_free = (rd_left <= 1);          // idle or in its last step
  assign go      = (wr_last || pend) && rd_free;
  assign go_blk  = pend ? pend_blk : cur_blk;
  assign ready   = !pend && !(step && rd_bank == wbank);

  ctc_intlv_addr_gen u_ag (
    .clk, .rst_n,
    .start    (go),
    .blk_id   (go_blk),
    .step     (step),
    .addr_lin (ag_lin),
    .addr_int (ag_int),
    .valid_out(ag_valid),
    .last     (ag_last)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_left    <= '0;
      pend       <= 1'b0;
      pend_bank  <= 1'b0;
      pend_blk   <= '0;
      rd_bank    <= 1'b0;
      rd_blk     <= '0;
      step_bank  <= 1'b0;
      step_blk   <= '0;
      valid_out  <= 1'b0;
      start_out  <= 1'b0;
      blk_id_out <= '0;
      a_out      <= 1'b0;
      b_out      <= 1'b0;
    end else begin
      if (step) begin
        rd_left   <= rd_left - 1'b1;
        step_bank <= rd_bank;
        step_blk  <= rd_blk;
      end
      if (go) begin
        rd_left <= (KW+1)'(blk_n(go_blk));
        rd_bank <= pend ? pend_bank : wbank;
        rd_blk  <= go_blk;
        pend    <= 1'b0;
      end else if (wr_last) begin
        pend      <= 1'b1;
        pend_bank <= wbank;
        pend_blk  <= cur_blk;
      end
      valid_out <= ag_valid;
      start_out <= ag_valid && (ag_lin == '0);
      if (ag_valid) begin
        {a_out, b_out} <= mem[step_bank][ag_int];
        blk_id_out     <= step_blk;
      end
    end
  end
  a_ready: assert property (@(posedge clk) disable iff (!rst_n) valid_in |-> ready);
endmodule

