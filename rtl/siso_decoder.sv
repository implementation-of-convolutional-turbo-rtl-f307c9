// siso_decoder - soft-input soft-output component decoder of the 802.16e
// double-binary turbo code: sliding-window max-log-MAP.
//
// A block of N couples is cut into windows of W couples. Time is divided into
// slots of W cycles. In slot t the forward unit walks window t in natural
// order: it requests the received values and a-priori values of each couple,
// computes the 15 branch metrics (branch_metric_unit), stores them, stores
// the forward metrics A_k normalised to state 0 (seven 8-bit values, state 0
// is implicitly zero), and advances the forward recursion
// (state_metric_unit). In the same slot the backward unit walks window t-1
// in reverse order: it reads the stored branch and forward metrics, runs the
// backward recursion from equiprobable metrics at the window end (from the
// circulation state at the end of the block, once known), and feeds the
// two-stage llr_unit and the extrinsic_unit, so extrinsic values and hard
// decisions leave in reverse order inside each window, tagged with their
// couple index. Branch and forward metric memories are split into two banks
// (ping-pong): window t is written while window t-1 is read. A block takes
// (ceil(N/W) + 1) * W cycles plus a short drain.
//
// Circulation state: on the first pass (sc_valid low) the forward recursion
// starts with all states equally likely and the last window's backward
// recursion too. sc_out reports the most likely final state of the forward
// recursion; fed back as sc_in with sc_valid on the next pass over the same
// block, it biases the forward start and the backward start of the last
// window towards that state.
//
// Interface and timing: start (one cycle) with blk_id, sc_valid, sc_in begins
// a pass. The decoder requests couple rd_k with rd_en and expects its values
// on ra .. le11 exactly IN_LAT cycles later. Results leave on valid_out with
// k_out; done pulses when the pass is over; busy is high during a pass.
module siso_decoder
  import ctc_pkg::*;
#(
  parameter int W      = 32,
  parameter int IN_LAT = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  blk_id_t blk_id,
  input  logic    sc_valid,
  input  state_t  sc_in,
  output logic    rd_en,
  output idx_t    rd_k,
  input  rx_t     ra,
  input  rx_t     rb,
  input  rx_t     ry,
  input  rx_t     rw,
  input  le_t     le01,
  input  le_t     le10,
  input  le_t     le11,
  output logic    valid_out,
  output idx_t    k_out,
  output le_t     le01_out,
  output le_t     le10_out,
  output le_t     le11_out,
  output logic    a_hat,
  output logic    b_hat,
  output state_t  sc_out,
  output logic    busy,
  output logic    done
);
  localparam int WA   = $clog2(W);
  localparam int SLW  = $clog2(NMAX / W + 2) + 1;
  localparam int AMW  = 7 * SMW;
  localparam sm_t BIAS = sm_t'(-64);     // start metric of unlikely states
  localparam int  DRAIN = IN_LAT + 6;

  typedef struct packed {
    logic           act;
    logic [SLW-1:0] slot;
    logic [WA-1:0]  cnt;
  } tline_t;

  // ---------------- control ----------------
  logic [KW:0]    n_q;
  logic [SLW-1:0] nwin_q;
  logic           scv_q;
  state_t         sc_q;
  tline_t         req;
  tline_t         pipe [IN_LAT];
  tline_t         d;
  logic [4:0]     drain;
  logic           req_end;

  assign req_end = req.act && (req.slot == nwin_q) && (req.cnt == WA'(W - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q <= '0; nwin_q <= '0; scv_q <= 1'b0; sc_q <= '0; req <= '0;
      drain <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        n_q    <= (KW+1)'(blk_n(blk_id));
        nwin_q <= SLW'((blk_n(blk_id) + W - 1) / W);
        scv_q  <= sc_valid;
        sc_q   <= sc_in;
        req    <= '{act: 1'b1, slot: '0, cnt: '0};
        busy   <= 1'b1;
      end else if (req.act) begin
        if (req_end) begin
          req.act <= 1'b0;
          drain   <= 5'(DRAIN);
        end else if (req.cnt == WA'(W - 1)) begin
          req.cnt  <= '0;
          req.slot <= req.slot + 1'b1;
        end else begin
          req.cnt <= req.cnt + 1'b1;
        end
      end else if (busy) begin
        if (drain == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          drain <= drain - 1'b1;
        end
      end
    end
  end

  logic [KW:0] req_k;
  assign req_k = (KW+1)'(req.slot) * (KW+1)'(W) + (KW+1)'(req.cnt);
  assign rd_en = req.act && (req.slot < nwin_q) && (req_k < n_q);
  assign rd_k  = req_k[KW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < IN_LAT; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= req;
      for (int i = 1; i < IN_LAT; i++) pipe[i] <= pipe[i-1];
    end
  end
  assign d = pipe[IN_LAT-1];

  // ---------------- memories ----------------
  logic [BM_MEM_W-1:0] gmem [2*W];
  logic [AMW-1:0]      amem [2*W];

  function automatic logic [BM_MEM_W-1:0] pack_bm(input bm_t g [16]);
    logic [BM_MEM_W-1:0] v;
    v = '0;
    for (int l = 1; l < 16; l++)
      for (int b = 0; b < BMW; b++)
        if (b < bm_width(l)) v[bm_offset(l) + b] = g[l][b];
    return v;
  endfunction

  function automatic void unpack_bm(input logic [BM_MEM_W-1:0] v, output bm_t g [16]);
    g[0] = '0;
    for (int l = 1; l < 16; l++)
      for (int b = 0; b < BMW; b++)
        g[l][b] = (b < bm_width(l)) ? v[bm_offset(l) + b] : v[bm_offset(l) + bm_width(l) - 1];
  endfunction

  // ---------------- forward unit ----------------
  logic        fv;
  logic [KW:0] fk;
  assign fk = (KW+1)'(d.slot) * (KW+1)'(W) + (KW+1)'(d.cnt);
  assign fv = d.act && (d.slot < nwin_q) && (fk < n_q);

  bm_t gamma_f [16];
  branch_metric_unit u_bmu (
    .ra, .rb, .ry, .rw, .le01, .le10, .le11, .gamma(gamma_f)
  );

  sm_t alpha_q [8], alpha_cur [8], alpha_nxt [8], start_m [8];
  always_comb begin
    for (int s = 0; s < 8; s++)
      start_m[s] = (scv_q && state_t'(s) != sc_q) ? BIAS : sm_t'(0);
    for (int s = 0; s < 8; s++)
      alpha_cur[s] = (fk == 0) ? start_m[s] : alpha_q[s];
  end

  state_metric_unit #(.BACKWARD(1'b0)) u_alpha (
    .m_in(alpha_cur), .gamma(gamma_f), .m_out(alpha_nxt)
  );

  // forward metrics normalised to state 0 before storage
  logic [AMW-1:0] alpha_word;
  always_comb begin
    for (int s = 1; s < 8; s++)
      alpha_word[(s-1)*SMW +: SMW] = sm_t'(sat(16'(alpha_cur[s]) - 16'(alpha_cur[0]), SMW));
  end

  function automatic state_t argmax8(input sm_t m [8]);
    state_t b;
    b = '0;
    for (int s = 1; s < 8; s++) if (m[s] > m[b]) b = 3'(s);
    return b;
  endfunction

  always_ff @(posedge clk) begin
    if (fv) begin
      gmem[{d.slot[0], d.cnt}] <= pack_bm(gamma_f);
      amem[{d.slot[0], d.cnt}] <= alpha_word;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 8; s++) alpha_q[s] <= '0;
      sc_out <= '0;
    end else if (fv) begin
      alpha_q <= alpha_nxt;
      if (fk == n_q - 1'b1) sc_out <= argmax8(alpha_nxt);
    end
  end

  // ---------------- backward unit ----------------
  logic [SLW-1:0] bw;
  logic [KW:0]    blen, bk;
  logic [WA-1:0]  baddr;
  logic           bv;
  always_comb begin
    bw    = d.slot - 1'b1;
    blen  = n_q - (KW+1)'(bw) * (KW+1)'(W);
    if (blen > (KW+1)'(W)) blen = (KW+1)'(W);
    bv    = d.act && (d.slot != 0) && ((KW+1)'(d.cnt) < blen);
    baddr = WA'(blen - 1'b1 - (KW+1)'(d.cnt));
    bk    = (KW+1)'(bw) * (KW+1)'(W) + (KW+1)'(baddr);
  end

  logic [BM_MEM_W-1:0] g_rd;
  logic [AMW-1:0]      a_rd;
  logic                b1v, b1first, b1lastwin;
  idx_t                b1k;

  always_ff @(posedge clk) begin
    if (bv) begin
      g_rd <= gmem[{bw[0], baddr}];
      a_rd <= amem[{bw[0], baddr}];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b1v <= 1'b0; b1first <= 1'b0; b1lastwin <= 1'b0; b1k <= '0;
    end else begin
      b1v       <= bv;
      b1first   <= (d.cnt == '0);
      b1lastwin <= (bw == nwin_q - 1'b1);
      b1k       <= bk[KW-1:0];
    end
  end

  bm_t gamma_b [16];
  sm_t alpha_b [8], beta_q [8], beta_prev [8], beta_nxt [8];
  always_comb begin
    unpack_bm(g_rd, gamma_b);
    alpha_b[0] = '0;
    for (int s = 1; s < 8; s++) alpha_b[s] = a_rd[(s-1)*SMW +: SMW];
    for (int s = 0; s < 8; s++)
      beta_prev[s] = !b1first ? beta_q[s] : (b1lastwin ? start_m[s] : sm_t'(0));
  end

  state_metric_unit #(.BACKWARD(1'b1)) u_beta (
    .m_in(beta_prev), .gamma(gamma_b), .m_out(beta_nxt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 8; s++) beta_q[s] <= '0;
    end else if (b1v) begin
      beta_q <= beta_nxt;
    end
  end

  localparam int TAGW = KW + 3 * BMW;
  logic            llr_v;
  logic [TAGW-1:0] llr_tag;
  tl_t             t_k [4];

  llr_unit #(.TAGW(TAGW)) u_llr (
    .clk, .rst_n, .valid_in(b1v),
    .tag_in({b1k, gamma_b[4], gamma_b[8], gamma_b[12]}),
    .alpha(alpha_b), .gamma(gamma_b), .beta(beta_prev),
    .valid_out(llr_v), .tag_out(llr_tag), .t(t_k)
  );

  logic [TAGW-1:0] ext_tag;
  extrinsic_unit #(.TAGW(TAGW)) u_ext (
    .clk, .rst_n, .valid_in(llr_v), .tag_in(llr_tag), .t(t_k),
    .g01(llr_tag[2*BMW +: BMW]), .g10(llr_tag[BMW +: BMW]), .g11(llr_tag[0 +: BMW]),
    .valid_out, .tag_out(ext_tag),
    .le01(le01_out), .le10(le10_out), .le11(le11_out), .a_hat, .b_hat
  );
  assign k_out = ext_tag[TAGW-1 -: KW];

  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start);
endmodule
