// ctc_intlv_addr_gen - CTC interleaver address generator without a
// multiplier and without a full address table.
//
// The interleaved address P(j) = (P0*j + 1 + offset(j mod 4)) mod N is
// rewritten as a recursion: P(0..3) are read from a 12-entry start-value ROM,
// and every later address is P(j) = (P(j-4) + 4*P0) mod N. Four registers
// keep the last address of each class j mod 4; because only one class is
// updated per cycle, one adder and one modulo unit are shared by all four.
// The modulo needs no divider: the sum X is below 3N, so X, X-N and X-2N are
// formed in parallel and the smallest non-negative one is taken (fixed
// latency). The linear address is a mod-N counter.
//
// Interface and timing: start (one cycle) latches blk_id and loads the start
// values. Each cycle with step high then presents one address pair on
// addr_lin / addr_int (registered, valid with valid_out one cycle after the
// step) and last marks j = N-1. Steps after the last address are ignored
// until the next start. A start may share its cycle with the last step of the
// previous block, so blocks can be generated back to back.
module ctc_intlv_addr_gen
  import ctc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  blk_id_t blk_id,
  input  logic    step,
  output idx_t    addr_lin,
  output idx_t    addr_int,
  output logic    valid_out,
  output logic    last
);
  logic [KW:0]   n_q;          // block size
  logic [KW:0]   inc_q;        // 4*P0 (not reduced)
  idx_t          acc_q [4];    // last address of each class j mod 4
  idx_t          j_q;
  logic          busy_q;
  logic [1:0]    cls;
  logic [KW+1:0] x, x1, x2;
  idx_t          next_addr;

  assign cls = j_q[1:0];

  // Shared adder and three-way parallel modulo.
  always_comb begin
    x  = {2'b00, acc_q[cls]} + {1'b0, inc_q};
    x1 = x - {1'b0, n_q};
    x2 = x - {n_q, 1'b0};
    if (!x2[KW+1])      next_addr = x2[KW-1:0];
    else if (!x1[KW+1]) next_addr = x1[KW-1:0];
    else                next_addr = x[KW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q       <= '0;
      inc_q     <= '0;
      j_q       <= '0;
      busy_q    <= 1'b0;
      valid_out <= 1'b0;
      last      <= 1'b0;
      addr_lin  <= '0;
      addr_int  <= '0;
      for (int i = 0; i < 4; i++) acc_q[i] <= '0;
    end else begin
      valid_out <= 1'b0;
      last      <= 1'b0;
      if (step && busy_q) begin
        addr_lin   <= j_q;
        addr_int   <= acc_q[cls];
        valid_out  <= 1'b1;
        acc_q[cls] <= next_addr;
        if ({1'b0, j_q} == n_q - 1'b1) begin
          last   <= 1'b1;
          busy_q <= 1'b0;
        end
        j_q <= j_q + 1'b1;
      end
      // A start may coincide with the last step of the previous block.
      if (start) begin
        n_q    <= (KW+1)'(blk_n(blk_id));
        inc_q  <= (KW+1)'(4 * blk_p0(blk_id));
        j_q    <= '0;
        busy_q <= 1'b1;
        for (int i = 0; i < 4; i++) acc_q[i] <= KW'(blk_pinit(blk_id, i));
      end
    end
  end
endmodule
