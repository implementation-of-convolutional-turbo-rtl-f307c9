// symbol_select - symbol grouping and symbol selection (puncturing) of
// 802.16e CTC sub-packet generation.
//
// Grouping: the interleaved sub-blocks are laid out in one 6N-symbol buffer
// as A (0..N-1), B (N..2N-1), Y1/Y2 interlaced symbol by symbol (2N..4N-1)
// and W1/W2 interlaced (4N..6N-1). Selection: the sub-packet consists of the
// L symbols with indices S_i = (F + i) mod 6N, i = 0..L-1, where
// F = (SPID * L) mod 6N. L = 48 * N_SCH * m (or 2N / code rate) is supplied
// by the caller; SPID = 0 gives the non-HARQ case S_i = i.
//
// Interface and timing: the six interleaved symbols {A, B, Y1, Y2, W1, W2}
// of sub-block position i arrive one word per cycle with valid_in, start on
// the first word, blk_id, num_sym (L, at most 6N) and spid latched with
// start. After the N-th word the L selected symbols leave one per cycle on
// sym with valid_out, first and last marking the ends; ready is low from the
// end of a block until its sub-packet has left (a single buffer).
module symbol_select
  import ctc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  blk_id_t     blk_id,
  input  logic [10:0] num_sym,
  input  logic [1:0]  spid,
  input  logic        valid_in,
  input  logic [5:0]  din,
  output logic        ready,
  output logic        valid_out,
  output logic        first,
  output logic        last,
  output logic        sym
);
  localparam int BUFW = 6 * NMAX;
  localparam int SW   = 11;

  logic [BUFW-1:0] buffer;
  logic [SW-1:0]   n_q, n6_q, l_q, f_q, rd_idx, rd_left;
  logic [1:0]      spid_q;
  idx_t            wcnt, wa;
  logic            busy_out;
  logic [SW-1:0]   n_cur;

  // (spid * L) mod 6N with spid <= 3 and L <= 6N: at most two subtractions
  function automatic logic [SW-1:0] first_index(input logic [1:0] sp, input logic [SW-1:0] l,
                                               input logic [SW-1:0] n6);
    logic [SW+1:0] f;
    f = (SW+2)'(sp) * (SW+2)'(l);
    for (int r = 0; r < 3; r++)
      if (f >= (SW+2)'(n6)) f = f - (SW+2)'(n6);
    return f[SW-1:0];
  endfunction

  assign n_cur = start ? SW'(blk_n(blk_id)) : n_q;
  assign wa    = start ? '0 : wcnt;
  assign ready = !busy_out;

  logic wr_last;
  assign wr_last = valid_in && ({3'b000, wa} == n_cur - 1'b1);

  always_ff @(posedge clk) begin
    if (valid_in) begin
      buffer[SW'(wa)]                      <= din[5];
      buffer[n_cur + SW'(wa)]              <= din[4];
      buffer[2*n_cur + 2*SW'(wa)]          <= din[3];
      buffer[2*n_cur + 2*SW'(wa) + 1'b1]   <= din[2];
      buffer[4*n_cur + 2*SW'(wa)]          <= din[1];
      buffer[4*n_cur + 2*SW'(wa) + 1'b1]   <= din[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q <= '0; n6_q <= '0; l_q <= '0; f_q <= '0; spid_q <= '0; wcnt <= '0;
      busy_out <= 1'b0; rd_idx <= '0; rd_left <= '0;
      valid_out <= 1'b0; first <= 1'b0; last <= 1'b0; sym <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      first     <= 1'b0;
      last      <= 1'b0;
      if (valid_in) begin
        wcnt <= wr_last ? '0 : wa + 1'b1;
        if (start) begin
          n_q    <= n_cur;
          n6_q   <= 6 * n_cur;
          l_q    <= num_sym;
          spid_q <= spid;
        end
      end
      if (wr_last) begin
        busy_out <= 1'b1;
        rd_idx   <= first_index(start ? spid : spid_q, start ? num_sym : l_q, 6 * n_cur);
        rd_left  <= start ? num_sym : l_q;
        f_q      <= '1;
      end else if (busy_out) begin
        if (rd_left == 0) begin
          busy_out <= 1'b0;
        end else begin
          valid_out <= 1'b1;
          sym       <= buffer[rd_idx];
          first     <= (f_q != 0);
          last      <= (rd_left == 1);
          f_q       <= '0;
          rd_left   <= rd_left - 1'b1;
          rd_idx    <= (rd_idx == n6_q - 1'b1) ? '0 : rd_idx + 1'b1;
          if (rd_left == 1) busy_out <= 1'b0;
        end
      end
    end
  end

  a_ready: assert property (@(posedge clk) disable iff (!rst_n) valid_in |-> ready);
endmodule
