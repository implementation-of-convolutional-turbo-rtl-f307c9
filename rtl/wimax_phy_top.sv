// wimax_phy_top - Mobile WiMAX baseband blocks of this design, side by side.
//
//   Transmit: ctc_encoder (double-binary CTC, tail-biting) -> subblock_
//             interleaver -> symbol_select (grouping and puncturing) gives
//             the sub-packet bit stream for one block.
//   Receive:  turbo_decoder (sliding-window max-log-MAP, soft inputs) and
//             tracking_top (pilot based timing / frequency tracking of one
//             1024-point FUSC symbol). The cyclic-prefix removal and FFT in
//             front of the tracking are outside this design; the add/drop
//             decision for them is brought out on trk_rob / trk_stuff.
//
// The transmit chain takes one block at a time: tx_ready stays low from the
// last couple of a block until its sub-packet has left symbol_select, so no
// stage ever has to stall an output it cannot hold back. This scheduling is
// this design's choice; the document does not connect the blocks.
//
// Interface and timing: see the individual blocks. tx_* couples with
// tx_valid/tx_ready, tx_start on the first couple with tx_blk_id,
// tx_num_sym (sub-packet length L in symbols) and tx_spid. The sub-packet
// leaves on sp_sym with sp_valid, sp_first, sp_last.
module wimax_phy_top
  import ctc_pkg::*;
  import trk_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // transmit: CTC encoder and sub-packet generation
  input  logic        tx_valid,
  input  logic        tx_start,
  input  blk_id_t     tx_blk_id,
  input  logic [10:0] tx_num_sym,
  input  logic [1:0]  tx_spid,
  input  logic        tx_a,
  input  logic        tx_b,
  output logic        tx_ready,
  output logic        sp_valid,
  output logic        sp_first,
  output logic        sp_last,
  output logic        sp_sym,
  // receive: turbo decoder
  input  logic        dec_in_valid,
  input  logic        dec_in_start,
  input  blk_id_t     dec_blk_id,
  input  logic [3:0]  dec_num_iter,
  input  rx_t         dec_ra,
  input  rx_t         dec_rb,
  input  rx_t         dec_ry1,
  input  rx_t         dec_rw1,
  input  rx_t         dec_ry2,
  input  rx_t         dec_rw2,
  output logic        dec_in_ready,
  output logic        dec_out_valid,
  output logic        dec_out_start,
  output logic        dec_out_a,
  output logic        dec_out_b,
  output logic        dec_busy,
  // receive: timing / frequency tracking
  input  logic        trk_in_valid,
  input  logic        trk_in_first,
  input  logic        trk_in_odd,
  input  logic        trk_in_pilot_neg,
  input  samp_t       trk_in_re,
  input  samp_t       trk_in_im,
  output logic        trk_in_ready,
  output logic        trk_out_valid,
  output samp_t       trk_out_re,
  output samp_t       trk_out_im,
  output sidx_t       trk_out_idx,
  output logic        trk_coef_valid,
  output slope_t      trk_a_coef,
  output ang_t        trk_b_coef,
  output logic        trk_rob,
  output logic        trk_stuff
);
  // ---------------- transmit chain ----------------
  logic        enc_ready, enc_valid, enc_start;
  blk_id_t     enc_blk;
  logic        enc_a, enc_b, enc_y1, enc_w1, enc_y2, enc_w2;
  logic        sbi_ready, sbi_valid, sbi_start;
  blk_id_t     sbi_blk;
  logic [5:0]  sbi_dout;
  logic        ss_ready;
  logic        tx_busy;
  idx_t        tx_left;
  logic [10:0] num_sym_q;
  logic [1:0]  spid_q;
  logic        tx_acc;

  assign tx_ready = enc_ready && (tx_left != '0 || !tx_busy);
  assign tx_acc   = tx_valid && tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_busy <= 1'b0; tx_left <= '0; num_sym_q <= '0; spid_q <= '0;
    end else begin
      if (tx_acc && tx_start) begin
        tx_busy   <= 1'b1;
        tx_left   <= idx_t'(blk_n(tx_blk_id) - 1);
        num_sym_q <= tx_num_sym;
        spid_q    <= tx_spid;
      end else if (tx_acc && tx_left != '0) begin
        tx_left <= tx_left - 1'b1;
      end
      if (sp_valid && sp_last) tx_busy <= 1'b0;
    end
  end

  ctc_encoder u_enc (
    .clk, .rst_n, .start(tx_acc && tx_start), .blk_id(tx_blk_id),
    .valid_in(tx_acc), .a(tx_a), .b(tx_b), .ready(enc_ready),
    .valid_out(enc_valid), .start_out(enc_start), .blk_id_out(enc_blk),
    .a_out(enc_a), .b_out(enc_b), .y1(enc_y1), .w1(enc_w1), .y2(enc_y2), .w2(enc_w2)
  );

  subblock_interleaver u_sbi (
    .clk, .rst_n, .start(enc_start), .blk_id(enc_blk), .valid_in(enc_valid),
    .din({enc_a, enc_b, enc_y1, enc_y2, enc_w1, enc_w2}), .ready(sbi_ready),
    .valid_out(sbi_valid), .start_out(sbi_start), .blk_id_out(sbi_blk), .dout(sbi_dout)
  );

  symbol_select u_ss (
    .clk, .rst_n, .start(sbi_start), .blk_id(sbi_blk), .num_sym(num_sym_q),
    .spid(spid_q), .valid_in(sbi_valid), .din(sbi_dout), .ready(ss_ready),
    .valid_out(sp_valid), .first(sp_first), .last(sp_last), .sym(sp_sym)
  );

  // one block in flight: the later stages are always ready when data arrives
  a_sbi_ready: assert property (@(posedge clk) disable iff (!rst_n) enc_valid |-> sbi_ready);
  a_ss_ready:  assert property (@(posedge clk) disable iff (!rst_n) sbi_valid |-> ss_ready);

  // ---------------- receive: turbo decoder ----------------
  turbo_decoder u_dec (
    .clk, .rst_n, .in_ready(dec_in_ready), .in_valid(dec_in_valid),
    .in_start(dec_in_start), .blk_id(dec_blk_id), .num_iter(dec_num_iter),
    .ra(dec_ra), .rb(dec_rb), .ry1(dec_ry1), .rw1(dec_rw1), .ry2(dec_ry2), .rw2(dec_rw2),
    .out_valid(dec_out_valid), .out_start(dec_out_start),
    .out_a(dec_out_a), .out_b(dec_out_b), .busy(dec_busy)
  );

  // ---------------- receive: tracking ----------------
  tracking_top u_trk (
    .clk, .rst_n, .in_valid(trk_in_valid), .in_first(trk_in_first),
    .in_odd(trk_in_odd), .in_pilot_neg(trk_in_pilot_neg),
    .in_re(trk_in_re), .in_im(trk_in_im), .in_ready(trk_in_ready),
    .out_valid(trk_out_valid), .out_re(trk_out_re), .out_im(trk_out_im),
    .out_idx(trk_out_idx), .coef_valid(trk_coef_valid), .a_coef(trk_a_coef),
    .b_coef(trk_b_coef), .rob(trk_rob), .stuff(trk_stuff)
  );
endmodule
