// subblk_addr_gen - address generator of the 802.16e sub-block interleaver.
//
// The tentative address T_k = 2^m * (k mod J) + BRO_m(floor(k / J)) is
// formed by concatenating a 2-bit counter (k mod J) and the bit-reversed
// output of an m-bit counter (floor(k/J)); no adder is needed. Addresses with
// T_k >= N are discarded. To keep one address per cycle, the candidate that
// follows the current one is formed and compared with N in parallel; when it
// would be discarded the generator skips it (at most one candidate in a row
// is ever discarded for the 802.16e parameters), so the output never stalls.
//
// Interface and timing: start latches blk_id (N, m, J). Each cycle with step
// high presents one address AD_i on addr (registered, valid with valid_out
// one cycle after the step, i = 0..N-1) with the linear index i on addr_lin;
// last marks i = N-1. A start may share its cycle with the last step of the
// previous block, so blocks can be generated back to back.
module subblk_addr_gen
  import ctc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  blk_id_t blk_id,
  input  logic    step,
  output idx_t    addr,
  output idx_t    addr_lin,
  output logic    valid_out,
  output logic    last
);
  logic [KW:0] n_q;
  logic [2:0]  m_q;
  logic [1:0]  jm1_q;      // J - 1
  logic [1:0]  kj_q;       // k mod J
  logic [6:0]  q_q;        // floor(k / J)
  idx_t        i_q;
  logic        busy_q;

  // bit reversal of the m-bit value q
  function automatic logic [KW:0] tent(input logic [1:0] kj, input logic [6:0] q, input logic [2:0] m);
    logic [6:0] r;
    r = '0;
    for (int t = 0; t < 7; t++)
      if (t < int'(m)) r[int'(m) - 1 - t] = q[t];
    return ((KW+1)'(kj) << m) | (KW+1)'(r);
  endfunction

  // successor of a counter pair
  function automatic logic [8:0] succ(input logic [1:0] kj, input logic [6:0] q, input logic [1:0] jm1);
    if (kj == jm1) return {2'b00, q + 7'd1};
    return {kj + 2'd1, q};
  endfunction

  logic [KW:0] t_cur, t_nxt;
  logic [8:0]  s1, s2;
  assign t_cur = tent(kj_q, q_q, m_q);
  assign s1    = succ(kj_q, q_q, jm1_q);
  assign t_nxt = tent(s1[8:7], s1[6:0], m_q);
  assign s2    = succ(s1[8:7], s1[6:0], jm1_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q <= '0; m_q <= '0; jm1_q <= '0; kj_q <= '0; q_q <= '0; i_q <= '0;
      busy_q <= 1'b0; addr <= '0; addr_lin <= '0; valid_out <= 1'b0; last <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      last      <= 1'b0;
      if (step && busy_q) begin
        addr      <= t_cur[KW-1:0];
        addr_lin  <= i_q;
        valid_out <= 1'b1;
        i_q       <= i_q + 1'b1;
        if ({1'b0, i_q} == n_q - 1'b1) begin
          last   <= 1'b1;
          busy_q <= 1'b0;
        end
        // look-ahead: skip the next candidate if it is out of range
        if (t_nxt >= n_q) {kj_q, q_q} <= s2;
        else              {kj_q, q_q} <= s1;
      end
      // a start may share its cycle with the last step of the previous block
      if (start) begin
        n_q    <= (KW+1)'(blk_n(blk_id));
        m_q    <= 3'(sbi_m(blk_id));
        jm1_q  <= 2'(sbi_j(blk_id) - 1);
        kj_q   <= '0;
        q_q    <= '0;          // T_0 = 0 is always valid
        i_q    <= '0;
        busy_q <= 1'b1;
      end
    end
  end
endmodule
