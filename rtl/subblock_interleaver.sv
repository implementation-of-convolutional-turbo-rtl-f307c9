// subblock_interleaver - the six sub-block interleavers of 802.16e CTC
// sub-packet generation.
//
// The encoder output of a block is split into six sub-blocks A, B, Y1, Y2,
// W1, W2 of N symbols each. All six are written at linear addresses into one
// of two RAM banks (six bits per word) and read back together at the
// sub-block interleaver addresses AD_i of subblk_addr_gen: one address
// generator serves all six sub-blocks. While one bank is read the next block
// fills the other.
//
// Interface and timing: one encoder couple per cycle with valid_in (din =
// {A, B, Y1, Y2, W1, W2}), start on its first couple with blk_id. After the
// last couple the interleaved block leaves one word per cycle on dout with
// valid_out, start_out on the first word; the first word leaves 3 cycles after
// the last input. ready is low while the bank to be written is still being
// read (only after a longer block); equal-size blocks stream without gaps.
module subblock_interleaver
  import ctc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  blk_id_t    blk_id,
  input  logic       valid_in,
  input  logic [5:0] din,
  output logic       ready,
  output logic       valid_out,
  output logic       start_out,
  output blk_id_t    blk_id_out,
  output logic [5:0] dout
);
  logic [5:0] mem [2][NMAX];

  idx_t    wcnt, wa, wn;
  logic    wbank;
  blk_id_t wblk, cur_blk;
  logic    wr_last;

  assign cur_blk = start ? blk_id : wblk;
  assign wa      = start ? '0 : wcnt;
  assign wn      = KW'(blk_n(cur_blk) - 1);
  assign wr_last = valid_in && (wa == wn);

  always_ff @(posedge clk) begin
    if (valid_in) mem[wbank][wa] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0; wbank <= 1'b0; wblk <= '0;
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

  logic        rd_bank, step_bank, ag_valid, ag_last, step, pend, pend_bank, rd_free, go;
  blk_id_t     rd_blk, step_blk, pend_blk, go_blk;
  logic [KW:0] rd_left;
  idx_t        ag_addr, ag_lin;

  assign step    = (rd_left != 0);
  assign rd_free = (rd_left <= 1);
  assign go      = (wr_last || pend) && rd_free;
  assign go_blk  = pend ? pend_blk : cur_blk;
  assign ready   = !pend && !(step && rd_bank == wbank);

  subblk_addr_gen u_ag (
    .clk, .rst_n, .start(go), .blk_id(go_blk), .step,
    .addr(ag_addr), .addr_lin(ag_lin), .valid_out(ag_valid), .last(ag_last)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_left <= '0; rd_bank <= 1'b0; rd_blk <= '0; step_bank <= 1'b0; step_blk <= '0;
      pend <= 1'b0; pend_bank <= 1'b0; pend_blk <= '0;
      valid_out <= 1'b0; start_out <= 1'b0; blk_id_out <= '0; dout <= '0;
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
        dout       <= mem[step_bank][ag_addr];
        blk_id_out <= step_blk;
      end
    end
  end

  a_ready: assert property (@(posedge clk) disable iff (!rst_n) valid_in |-> ready);
endmodule
