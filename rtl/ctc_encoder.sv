// ctc_encoder - circular rate-1/3 convolutional turbo encoder of 802.16e.
//
// Each block of N couples (A, B) is encoded twice. First pass: one
// constituent encoder starting from state 0 encodes the natural order and a
// second one encodes the interleaved order (ctc_interleaver); their final
// states address the circulation-state ROM (sc_rom) together with N mod 7,
// giving Sc1 and Sc2. Meanwhile the natural and the interleaved couples wait
// in two queues. Second pass: two more constituent encoders, loaded with Sc1
// and Sc2 through their INIT inputs, encode the queued streams, so that each
// encoder ends in the state it started from (tail biting).
//
// Interface and timing: one couple per cycle with valid_in, start on the
// first couple of a block together with blk_id; a couple may only be sent
// while ready is high (ready drops only when a block is shorter than the one
// before it, see ctc_interleaver). The encoded block leaves one couple per cycle with valid_out:
// systematic a_out, b_out, parities y1, w1 (natural order) and y2, w2
// (interleaved order); start_out and blk_id_out mark its first couple. The
// first couple leaves about 2N + 8 cycles after the first input couple.
module ctc_encoder
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
  output logic    b_out,
  output logic    y1,
  output logic    w1,
  output logic    y2,
  output logic    w2
);
  // ---------------- first pass: natural order ----------------
  blk_id_t nat_blk, cur_blk;
  idx_t    nat_cnt, nat_idx;
  logic    nat_last;
  assign cur_blk  = start ? blk_id : nat_blk;
  assign nat_idx  = start ? '0 : nat_cnt;
  assign nat_last = valid_in && (nat_idx == KW'(blk_n(cur_blk) - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nat_cnt <= '0;
      nat_blk <= '0;
    end else if (valid_in) begin
      nat_blk <= cur_blk;
      nat_cnt <= nat_last ? '0 : nat_idx + 1'b1;
    end
  end

  logic   pre1_y, pre1_w, pre1_v;
  state_t pre1_s;
  ctc_constituent_enc u_pre1 (
    .clk, .rst_n, .init(start), .init_stat(3'd0), .valid_in,
    .a, .b, .y(pre1_y), .w(pre1_w), .valid_out(pre1_v), .state(pre1_s)
  );

  // final state of the natural pass is in u_pre1 one cycle after nat_last
  logic    nat_done;
  blk_id_t nat_done_blk;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nat_done     <= 1'b0;
      nat_done_blk <= '0;
    end else begin
      nat_done     <= nat_last;
      nat_done_blk <= cur_blk;
    end
  end

  state_t sc1;
  sc_rom u_rom1 (.addr({pre1_s, 3'(blk_n(nat_done_blk) % 7)}), .sc(sc1));

  // ---------------- first pass: interleaved order ----------------
  logic    il_v, il_start, il_a, il_b;
  blk_id_t il_blk;
  ctc_interleaver u_il (
    .clk, .rst_n, .start, .blk_id, .valid_in, .a, .b, .ready,
    .valid_out(il_v), .start_out(il_start), .blk_id_out(il_blk),
    .a_out(il_a), .b_out(il_b)
  );

  idx_t il_cnt, il_idx;
  logic il_last;
  assign il_idx  = il_start ? '0 : il_cnt;
  assign il_last = il_v && (il_idx == KW'(blk_n(il_blk) - 1));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) il_cnt <= '0;
    else if (il_v) il_cnt <= il_last ? '0 : il_idx + 1'b1;
  end

  logic   pre2_y, pre2_w, pre2_v;
  state_t pre2_s;
  ctc_constituent_enc u_pre2 (
    .clk, .rst_n, .init(il_start), .init_stat(3'd0), .valid_in(il_v),
    .a(il_a), .b(il_b), .y(pre2_y), .w(pre2_w), .valid_out(pre2_v), .state(pre2_s)
  );

  logic    il_done;
  blk_id_t il_done_blk;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      il_done     <= 1'b0;
      il_done_blk <= '0;
    end else begin
      il_done     <= il_last;
      il_done_blk <= il_blk;
    end
  end

  state_t sc2;
  sc_rom u_rom2 (.addr({pre2_s, 3'(blk_n(il_done_blk) % 7)}), .sc(sc2));

  // ---------------- queues ----------------
  logic       nq_pop, nq_empty, nq_full;
  logic [1:0] nq_dout;
  sync_fifo #(.W(2), .DEPTH(512)) u_nat_q (
    .clk, .rst_n, .push(valid_in), .din({a, b}), .pop(nq_pop),
    .dout(nq_dout), .empty(nq_empty), .full(nq_full)
  );

  logic       iq_pop, iq_empty, iq_full;
  logic [1:0] iq_dout;
  sync_fifo #(.W(2), .DEPTH(256)) u_il_q (
    .clk, .rst_n, .push(il_v), .din({il_a, il_b}), .pop(iq_pop),
    .dout(iq_dout), .empty(iq_empty), .full(iq_full)
  );

  logic       j1_pop, j1_empty, j1_full;
  logic [6:0] j1_dout;   // {blk_id, Sc1}
  sync_fifo #(.W(7), .DEPTH(4)) u_sc1_q (
    .clk, .rst_n, .push(nat_done), .din({nat_done_blk, sc1}), .pop(j1_pop),
    .dout(j1_dout), .empty(j1_empty), .full(j1_full)
  );

  logic       j2_pop, j2_empty, j2_full;
  logic [2:0] j2_dout;   // Sc2
  sync_fifo #(.W(3), .DEPTH(4)) u_sc2_q (
    .clk, .rst_n, .push(il_done), .din(sc2), .pop(j2_pop),
    .dout(j2_dout), .empty(j2_empty), .full(j2_full)
  );

  // ---------------- second pass: circular encoding ----------------
  logic [KW:0] re_left;
  logic        re_first, re_v;
  blk_id_t     re_blk;
  state_t      re_sc1, re_sc2;
  logic        job_go;

  assign job_go = (re_left == 0) && !j1_empty && !j2_empty;
  assign j1_pop = job_go;
  assign j2_pop = job_go;
  assign re_v   = (re_left != 0);
  assign nq_pop = re_v;
  assign iq_pop = re_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      re_left  <= '0;
      re_first <= 1'b0;
      re_blk   <= '0;
      re_sc1   <= '0;
      re_sc2   <= '0;
    end else if (job_go) begin
      re_left  <= (KW+1)'(blk_n(j1_dout[6:3]));
      re_first <= 1'b1;
      re_blk   <= j1_dout[6:3];
      re_sc1   <= j1_dout[2:0];
      re_sc2   <= j2_dout;
    end else if (re_v) begin
      re_left  <= re_left - 1'b1;
      re_first <= 1'b0;
    end
  end

  logic   v1, v2;
  state_t s1_unused, s2_unused;
  ctc_constituent_enc u_enc1 (
    .clk, .rst_n, .init(re_first), .init_stat(re_sc1), .valid_in(re_v),
    .a(nq_dout[1]), .b(nq_dout[0]), .y(y1), .w(w1), .valid_out(v1), .state(s1_unused)
  );
  ctc_constituent_enc u_enc2 (
    .clk, .rst_n, .init(re_first), .init_stat(re_sc2), .valid_in(re_v),
    .a(iq_dout[1]), .b(iq_dout[0]), .y(y2), .w(w2), .valid_out(v2), .state(s2_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out  <= 1'b0;
      start_out  <= 1'b0;
      blk_id_out <= '0;
      a_out      <= 1'b0;
      b_out      <= 1'b0;
    end else begin
      valid_out  <= re_v;
      start_out  <= re_v && re_first;
      blk_id_out <= re_blk;
      if (re_v) {a_out, b_out} <= nq_dout;
    end
  end
endmodule
