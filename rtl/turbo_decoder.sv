// turbo_decoder - iterative decoder of the 802.16e double-binary
// convolutional turbo code (non-HARQ block sizes, N <= 240 couples).
//
// A single siso_decoder is used twice per iteration: first on the natural
// order (parities Y1, W1), then on the interleaved order (parities Y2, W2).
// The received systematic values and one shared extrinsic memory are kept
// in natural order. In the interleaved pass couple j is read at address P(j)
// from a look-up-table address generator (ctc_intlv_lut), with A/B and
// Le(0,1)/Le(1,0) exchanged when P(j) is odd (the couple swap of the
// encoder's interleaver); the extrinsic values the SISO produces, in reverse
// window order, are written straight back through a second table lookup, so
// no reordering buffer is needed. Before the first pass all a-priori values
// are taken as zero. Each pass reports the most likely circulation state,
// which the next pass of the same constituent code starts from. Hard
// decisions of the last interleaved pass are de-interleaved into an output
// memory and streamed out in natural order.
//
// Interface and timing: while in_ready is high a block may be loaded, one
// couple per cycle with in_valid (in_start and blk_id, num_iter on the first
// couple); received values are 4-bit two's complement, positive for bit 1.
// The decoded couples leave one per cycle on out_a, out_b with out_valid,
// out_start on the first. Decoding takes about
// 2 * num_iter * ((ceil(N/32) + 1) * 32 + 12) cycles after loading.
module turbo_decoder
  import ctc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output logic       in_ready,
  input  logic       in_valid,
  input  logic       in_start,
  input  blk_id_t    blk_id,
  input  logic [3:0] num_iter,
  input  rx_t        ra,
  input  rx_t        rb,
  input  rx_t        ry1,
  input  rx_t        rw1,
  input  rx_t        ry2,
  input  rx_t        rw2,
  output logic       out_valid,
  output logic       out_start,
  output logic       out_a,
  output logic       out_b,
  output logic       busy
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN, S_OUT} st_t;
  st_t st;

  logic [2*RXW-1:0]     sysmem [NMAX];
  logic [2*RXW-1:0]     p1mem  [NMAX];
  logic [2*RXW-1:0]     p2mem  [NMAX];
  logic [3*LEW-1:0]     lemem  [NMAX];
  logic [1:0]           decmem [NMAX];

  blk_id_t    blk_q;
  logic [3:0] niter_q, iter_q;
  logic       half_q, first_q, need_start;
  idx_t       cnt;
  logic [KW:0] n_q;
  logic       sc1_v, sc2_v;
  state_t     sc1, sc2;

  assign in_ready = (st == S_IDLE) || (st == S_LOAD);
  assign busy     = (st != S_IDLE);

  // ---------------- SISO and its read path ----------------
  logic   s_start, s_rd_en, s_vo, s_ah, s_bh, s_busy, s_done;
  idx_t   s_rd_k, s_ko;
  state_t s_sco;
  rx_t    s_ra, s_rb, s_ry, s_rw;
  le_t    s_l01, s_l10, s_l11, s_o01, s_o10, s_o11;

  assign s_start = (st == S_RUN) && need_start && !s_busy;

  siso_decoder #(.W(32), .IN_LAT(2)) u_siso (
    .clk, .rst_n, .start(s_start), .blk_id(blk_q),
    .sc_valid(half_q ? sc2_v : sc1_v), .sc_in(half_q ? sc2 : sc1),
    .rd_en(s_rd_en), .rd_k(s_rd_k),
    .ra(s_ra), .rb(s_rb), .ry(s_ry), .rw(s_rw), .le01(s_l01), .le10(s_l10), .le11(s_l11),
    .valid_out(s_vo), .k_out(s_ko), .le01_out(s_o01), .le10_out(s_o10), .le11_out(s_o11),
    .a_hat(s_ah), .b_hat(s_bh), .sc_out(s_sco), .busy(s_busy), .done(s_done)
  );

  idx_t rd_p, rk1;
  logic rv1;
  ctc_intlv_lut u_lut_rd (.clk, .blk_id(blk_q), .j(s_rd_k), .p(rd_p));

  always_ff @(posedge clk) begin
    rk1 <= s_rd_k;
    rv1 <= s_rd_en;
  end

  idx_t rd_addr;
  assign rd_addr = half_q ? rd_p : rk1;

  logic [2*RXW-1:0] sys_q, par_q;
  logic [3*LEW-1:0] le_q;
  logic             swap_rd;
  always_ff @(posedge clk) begin
    if (rv1) begin
      sys_q   <= sysmem[rd_addr];
      le_q    <= lemem[rd_addr];
      par_q   <= half_q ? p2mem[rk1] : p1mem[rk1];
      swap_rd <= half_q && rd_addr[0];
    end
  end

  always_comb begin
    s_ra  = swap_rd ? sys_q[RXW-1:0] : sys_q[2*RXW-1:RXW];
    s_rb  = swap_rd ? sys_q[2*RXW-1:RXW] : sys_q[RXW-1:0];
    s_ry  = par_q[2*RXW-1:RXW];
    s_rw  = par_q[RXW-1:0];
    if (first_q) begin
      s_l01 = '0; s_l10 = '0; s_l11 = '0;
    end else begin
      s_l01 = swap_rd ? le_q[LEW +: LEW] : le_q[2*LEW +: LEW];
      s_l10 = swap_rd ? le_q[2*LEW +: LEW] : le_q[LEW +: LEW];
      s_l11 = le_q[0 +: LEW];
    end
  end

  // ---------------- write-back path ----------------
  idx_t wr_p, wk1;
  logic wv1, wa1, wb1;
  le_t  w01, w10, w11;
  ctc_intlv_lut u_lut_wr (.clk, .blk_id(blk_q), .j(s_ko), .p(wr_p));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wv1 <= 1'b0;
    else        wv1 <= s_vo;
  end
  always_ff @(posedge clk) begin
    wk1 <= s_ko; wa1 <= s_ah; wb1 <= s_bh; w01 <= s_o01; w10 <= s_o10; w11 <= s_o11;
  end

  idx_t wr_addr;
  logic swap_wr, last_pass;
  assign wr_addr   = half_q ? wr_p : wk1;
  assign swap_wr   = half_q && wr_addr[0];
  assign last_pass = half_q && (iter_q == niter_q - 1'b1);

  always_ff @(posedge clk) begin
    if (wv1) begin
      lemem[wr_addr] <= swap_wr ? {w10, w01, w11} : {w01, w10, w11};
      if (last_pass) decmem[wr_addr] <= swap_wr ? {wb1, wa1} : {wa1, wb1};
    end
  end

  // ---------------- load, iterate, output ----------------
  idx_t in_idx;
  logic in_last;
  assign in_idx  = in_start ? '0 : cnt;
  assign in_last = in_valid && ({1'b0, in_idx} == (in_start ? (KW+1)'(blk_n(blk_id)) : n_q) - 1'b1);

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      sysmem[in_idx] <= {ra, rb};
      p1mem[in_idx]  <= {ry1, rw1};
      p2mem[in_idx]  <= {ry2, rw2};
    end
  end

  logic out_rd, out_rd_first;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; blk_q <= '0; niter_q <= 4'd1; iter_q <= '0; half_q <= 1'b0;
      first_q <= 1'b1; need_start <= 1'b0; cnt <= '0; n_q <= '0;
      sc1_v <= 1'b0; sc2_v <= 1'b0; sc1 <= '0; sc2 <= '0;
      out_rd <= 1'b0; out_rd_first <= 1'b0;
    end else begin
      out_rd       <= 1'b0;
      out_rd_first <= 1'b0;
      case (st)
        S_IDLE, S_LOAD: if (in_valid) begin
          if (in_start) begin
            blk_q   <= blk_id;
            n_q     <= (KW+1)'(blk_n(blk_id));
            niter_q <= (num_iter == 0) ? 4'd1 : num_iter;
          end
          cnt <= in_idx + 1'b1;
          st  <= S_LOAD;
          if (in_last) begin
            st         <= S_RUN;
            iter_q     <= '0;
            half_q     <= 1'b0;
            first_q    <= 1'b1;
            need_start <= 1'b1;
            sc1_v      <= 1'b0;
            sc2_v      <= 1'b0;
          end
        end
        S_RUN: begin
          if (s_start) need_start <= 1'b0;
          if (s_done) begin
            first_q <= 1'b0;
            if (!half_q) begin
              sc1        <= s_sco;
              sc1_v      <= 1'b1;
              half_q     <= 1'b1;
              need_start <= 1'b1;
            end else begin
              sc2    <= s_sco;
              sc2_v  <= 1'b1;
              half_q <= 1'b0;
              if (iter_q == niter_q - 1'b1) begin
                st  <= S_OUT;
                cnt <= '0;
              end else begin
                iter_q     <= iter_q + 1'b1;
                need_start <= 1'b1;
              end
            end
          end
        end
        S_OUT: begin
          out_rd       <= 1'b1;
          out_rd_first <= (cnt == '0);
          if ({1'b0, cnt} == n_q - 1'b1) st <= S_IDLE;
          cnt <= cnt + 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  idx_t out_addr;
  assign out_addr = cnt;
  logic [1:0] dec_q;
  always_ff @(posedge clk) if (st == S_OUT) dec_q <= decmem[out_addr];

  assign out_valid = out_rd;
  assign out_start = out_rd_first;
  assign out_a     = dec_q[1];
  assign out_b     = dec_q[0];
endmodule
