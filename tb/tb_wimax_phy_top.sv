// tb_wimax_phy_top - end-to-end, full-size testbench of wimax_phy_top (no
// parameter overrides; the top has none).
//
// Three activities run at once:
//   - transmit: blocks of several sizes go through CTC encoding, sub-block
//     interleaving and symbol selection; every sub-packet bit is compared
//     with a reference built here from ctc_ref_pkg's encoder, the standard's
//     sub-block interleaver formula, the grouping order and S_i = (F+i)
//     mod 6N, with different SPID values and lengths;
//   - decode: the same encoded blocks, turned into noisy soft values, are
//     decoded by the turbo decoder and compared with the data bits; the
//     decoding time is checked against the schedule (2 half-iterations per
//     iteration of (ceil(N/32)+1)*32 + 10 cycles each, plus N output cycles);
//   - tracking: symbols with a known phase ramp go through the tracking
//     chain; outputs are checked against the reported coefficients and the
//     rob/stuff pulses against the slope.
// Mechanisms counted, each must happen at least once: transmit back-pressure
// (tx_ready low while data waits), decoder input back-pressure, SPID wrap-
// around of the selection window, puncturing (L < 6N), CORDIC pre-rotation
// by pi, even and odd pilot patterns, rob, stuff, interleaver couple swap.
module tb_wimax_phy_top;
  import ctc_pkg::*;
  import trk_pkg::*;
  import ctc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        tx_valid = 0, tx_start = 0, tx_a = 0, tx_b = 0;
  blk_id_t     tx_blk_id = 0;
  logic [10:0] tx_num_sym = 0;
  logic [1:0]  tx_spid = 0;
  logic        tx_ready, sp_valid, sp_first, sp_last, sp_sym;
  logic        dec_in_valid = 0, dec_in_start = 0;
  blk_id_t     dec_blk_id = 0;
  logic [3:0]  dec_num_iter = 0;
  rx_t         dec_ra = 0, dec_rb = 0, dec_ry1 = 0, dec_rw1 = 0, dec_ry2 = 0, dec_rw2 = 0;
  logic        dec_in_ready, dec_out_valid, dec_out_start, dec_out_a, dec_out_b, dec_busy;
  logic        trk_in_valid = 0, trk_in_first = 0, trk_in_odd = 0, trk_in_pilot_neg = 0;
  samp_t       trk_in_re = 0, trk_in_im = 0;
  logic        trk_in_ready, trk_out_valid, trk_coef_valid, trk_rob, trk_stuff;
  samp_t       trk_out_re, trk_out_im;
  sidx_t       trk_out_idx;
  slope_t      trk_a_coef;
  ang_t        trk_b_coef;

  wimax_phy_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #40_000_000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // mechanism counters
  int m_tx_stall = 0, m_dec_stall = 0, m_wrap = 0, m_punct = 0, m_flip = 0;
  int m_even = 0, m_odd = 0, m_rob = 0, m_stuff = 0, m_swap = 0;
  always @(posedge clk) if (rst_n) begin
    if (tx_valid && !tx_ready) m_tx_stall++;
    if (dut.u_trk.u_pilot.u_cordic.valid_in && dut.u_trk.u_pilot.u_cordic.real_in[7]) m_flip++;
    if (trk_rob) m_rob++;
    if (trk_stuff) m_stuff++;
    if (dut.u_enc.u_il.valid_in && dut.u_enc.u_il.wa[0] && (dut.u_enc.u_il.a != dut.u_enc.u_il.b)) m_swap++;
  end

  // ---------------- transmit + decode ----------------
  int sp_bits[$];
  always @(posedge clk) if (rst_n && sp_valid) sp_bits.push_back(sp_sym);
  int dec_a[$], dec_b[$];
  always @(posedge clk) if (rst_n && dec_out_valid) begin dec_a.push_back(dec_out_a); dec_b.push_back(dec_out_b); end

  function automatic int bro(int v, int m);
    int r = 0;
    for (int i = 0; i < m; i++) r |= ((v >> i) & 1) << (m - 1 - i);
    return r;
  endfunction

  function automatic void ref_subpacket(int id, int spid, int l, int na[], int nb[],
                                        int y1[], int w1[], int y2[], int w2[], output int sp[]);
    int n = sizes[id];
    int mt [12] = '{3,4,4,5,5,5,6,6,6,6,6,7};
    int jt [12] = '{3,3,3,3,3,4,2,3,3,3,4,2};
    int ad[], grp[];
    int k, t, f;
    ad = new[n]; grp = new[6*n]; sp = new[l];
    k = 0;
    for (int i = 0; i < n; i++) begin
      do begin
        t = (1 << mt[id]) * (k % jt[id]) + bro(k / jt[id], mt[id]);
        k++;
      end while (t >= n);
      ad[i] = t;
    end
    for (int i = 0; i < n; i++) begin
      grp[i]           = na[ad[i]];
      grp[n + i]       = nb[ad[i]];
      grp[2*n + 2*i]   = y1[ad[i]];
      grp[2*n + 2*i+1] = y2[ad[i]];
      grp[4*n + 2*i]   = w1[ad[i]];
      grp[4*n + 2*i+1] = w2[ad[i]];
    end
    f = (spid * l) % (6 * n);
    for (int i = 0; i < l; i++) sp[i] = grp[(f + i) % (6 * n)];
  endfunction

  task automatic tx_block(int id, int spid, int l, int na[], int nb[]);
    int n = sizes[id];
    int y1[], w1[], y2[], w2[], sp[];
    int t_first, base, bad;
    encode(id, na, nb, y1, w1, y2, w2);
    ref_subpacket(id, spid, l, na, nb, y1, w1, y2, w2, sp);
    if ((spid * l) % (6 * n) + l > 6 * n) m_wrap++;
    if (l < 6 * n) m_punct++;
    sp_bits.delete();
    t_first = cyc;
    for (int i = 0; i < n; i++) begin
      tx_valid <= 1; tx_start <= (i == 0); tx_blk_id <= 4'(id);
      tx_num_sym <= 11'(l); tx_spid <= 2'(spid); tx_a <= na[i][0]; tx_b <= nb[i][0];
      @(posedge clk);
      while (!tx_ready) @(posedge clk);
    end
    tx_valid <= 0; tx_start <= 0;
    // keep offering the next block's first couple so back-pressure is seen
    // (only for a few cycles, while the chain is certainly still busy)
    tx_valid <= 1; tx_start <= 1; tx_blk_id <= 4'(id);
    repeat (4) @(posedge clk);
    tx_valid <= 0; tx_start <= 0;
    while (sp_bits.size() < l) @(posedge clk);
    @(posedge clk);
    check(sp_bits.size() == l, $sformatf("sub-packet length %0d, expected %0d", sp_bits.size(), l));
    bad = 0;
    for (int i = 0; i < l; i++) if (sp_bits[i] != sp[i]) bad++;
    check(bad == 0, $sformatf("N=%0d SPID=%0d L=%0d: %0d sub-packet bits differ", n, spid, l, bad));
    check(tx_ready == 1'b1, "tx_ready not back after sub-packet");
    $display("tx N=%0d SPID=%0d L=%0d done in %0d cycles", n, spid, l, cyc - t_first);
  endtask

  task automatic dec_block(int id, int iters, real sigma, int na[], int nb[]);
    int n = sizes[id];
    int y1[], w1[], y2[], w2[];
    int t0, bad, exp_c, raw;
    encode(id, na, nb, y1, w1, y2, w2);
    dec_a.delete(); dec_b.delete();
    raw = 0;
    if (!dec_in_ready) m_dec_stall++;
    while (!dec_in_ready) @(posedge clk);
    for (int i = 0; i < n; i++) begin
      dec_in_valid <= 1; dec_in_start <= (i == 0); dec_blk_id <= 4'(id); dec_num_iter <= 4'(iters);
      dec_ra  <= 4'(soft_val(na[i], 3.0, sigma)); dec_rb  <= 4'(soft_val(nb[i], 3.0, sigma));
      dec_ry1 <= 4'(soft_val(y1[i], 3.0, sigma)); dec_rw1 <= 4'(soft_val(w1[i], 3.0, sigma));
      dec_ry2 <= 4'(soft_val(y2[i], 3.0, sigma)); dec_rw2 <= 4'(soft_val(w2[i], 3.0, sigma));
      @(posedge clk);
      if ((dec_ra > 0) != (na[i] == 1)) raw++;
    end
    dec_in_valid <= 0; dec_in_start <= 0;
    // the next block is offered at once: the decoder is busy, so it must wait
    @(posedge clk);
    if (!dec_in_ready) m_dec_stall++;
    t0 = cyc;
    while (dec_a.size() < n) @(posedge clk);
    exp_c = 2 * iters * (((n + 31) / 32 + 1) * 32 + 10) + n;
    check(cyc - t0 >= exp_c - 10 && cyc - t0 <= exp_c + 10,
          $sformatf("decode N=%0d took %0d cycles, expected ~%0d", n, cyc - t0, exp_c));
    bad = 0;
    for (int i = 0; i < n; i++) begin
      if (dec_a[i] != na[i]) bad++;
      if (dec_b[i] != nb[i]) bad++;
    end
    check(bad == 0, $sformatf("decode N=%0d: %0d bit errors (raw A errors %0d)", n, bad, raw));
    $display("dec N=%0d sigma=%0.2f: raw A errors %0d, decoded errors %0d, %0d cycles", n, sigma, raw, bad, cyc - t0);
  endtask

  // ---------------- tracking ----------------
  samp_t sym_re [1024];
  samp_t sym_im [1024];
  logic  pneg   [1024];
  slope_t a_seen;
  ang_t   b_seen;
  int     n_out;
  always @(posedge clk) if (rst_n) begin
    if (trk_coef_valid) begin a_seen <= trk_a_coef; b_seen <= trk_b_coef; end
    if (trk_out_valid) begin
      real ph, er, ei;
      int  p, e_re, e_im;
      p  = int'(trk_out_idx) + 512;
      ph = (real'(a_seen) * real'(int'(trk_out_idx)) / 4.0 + real'(b_seen)) * 3.14159265358979 / 512.0;
      er = real'(sym_re[p]) * $cos(ph) + real'(sym_im[p]) * $sin(ph);
      ei = real'(sym_im[p]) * $cos(ph) - real'(sym_re[p]) * $sin(ph);
      e_re = int'(er);
      e_im = int'(ei);
      check(int'(trk_out_re) - e_re <= 3 && e_re - int'(trk_out_re) <= 3 &&
            int'(trk_out_im) - e_im <= 3 && e_im - int'(trk_out_im) <= 3,
            $sformatf("tracking k=%0d out=(%0d,%0d) exp=(%0d,%0d)", trk_out_idx, trk_out_re, trk_out_im, e_re, e_im));
      n_out++;
    end
  end

  task automatic trk_symbol(real s, real b, bit odd);
    int r0, s0, t_last;
    for (int i = 0; i < 1024; i++) begin
      real ph, dr, di;
      int  k = i - 512;
      bit  neg;
      ph = (s * k + b) * 3.14159265358979 / 512.0;
      neg = $urandom_range(0, 1);
      if (is_pilot(sidx_t'(k), odd)) begin dr = neg ? -60.0 : 60.0; di = 0.0; end
      else begin
        dr = $urandom_range(0, 1) ? 42.0 : -42.0;
        di = $urandom_range(0, 1) ? 42.0 : -42.0;
      end
      sym_re[i] = samp_t'(int'(dr * $cos(ph) - di * $sin(ph)));
      sym_im[i] = samp_t'(int'(dr * $sin(ph) + di * $cos(ph)));
      pneg[i]   = neg && is_pilot(sidx_t'(k), odd);
    end
    if (odd) m_odd++; else m_even++;
    r0 = m_rob; s0 = m_stuff; n_out = 0;
    while (!trk_in_ready) @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      trk_in_valid <= 1; trk_in_first <= (i == 0); trk_in_odd <= odd;
      trk_in_pilot_neg <= pneg[i]; trk_in_re <= sym_re[i]; trk_in_im <= sym_im[i];
      @(posedge clk);
      while (!trk_in_ready) @(posedge clk);
    end
    trk_in_valid <= 0; trk_in_first <= 0;
    t_last = cyc;
    while (n_out < 1024) @(posedge clk);
    check(cyc - t_last <= 1024 + 40, $sformatf("tracking symbol took %0d cycles after input", cyc - t_last));
    @(posedge clk);
    if (s >= 1.0)       check(m_rob == r0 + 1 && m_stuff == s0, "expected one rob");
    else if (s <= -1.0) check(m_stuff == s0 + 1 && m_rob == r0, "expected one stuff");
    else                check(m_rob == r0 && m_stuff == s0, "unexpected rob/stuff");
  endtask

  int ids   [5] = '{0, 11, 5, 3, 8};
  int spids [5] = '{0, 1, 3, 2, 0};
  int lmul  [5] = '{4, 3, 5, 6, 2};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    fork
      begin
        for (int b = 0; b < 5; b++) begin
          int na[], nb[];
          int n;
          n = sizes[ids[b]];
          na = new[n]; nb = new[n];
          for (int i = 0; i < n; i++) begin na[i] = $urandom_range(0, 1); nb[i] = $urandom_range(0, 1); end
          tx_block(ids[b], spids[b], lmul[b] * n, na, nb);
        end
      end
      begin
        for (int b = 0; b < 5; b++) begin
          int na[], nb[];
          int n;
          n = sizes[ids[b]];
          na = new[n]; nb = new[n];
          for (int i = 0; i < n; i++) begin na[i] = $urandom_range(0, 1); nb[i] = $urandom_range(0, 1); end
          dec_block(ids[b], 4, (b % 2) ? 1.2 : 0.01, na, nb);
        end
      end
      begin
        trk_symbol(0.5, 20.0, 0);
        trk_symbol(1.0, -40.0, 1);
        trk_symbol(-1.25, 100.0, 0);
        trk_symbol(0.0, -200.0, 1);
      end
    join
    $display("mechanisms: tx_stall=%0d dec_stall=%0d wrap=%0d punct=%0d flip=%0d even=%0d odd=%0d rob=%0d stuff=%0d swap=%0d",
             m_tx_stall, m_dec_stall, m_wrap, m_punct, m_flip, m_even, m_odd, m_rob, m_stuff, m_swap);
    check(m_tx_stall > 0, "transmit back-pressure never happened");
    check(m_dec_stall > 0, "decoder back-pressure never happened");
    check(m_wrap > 0, "selection window never wrapped");
    check(m_punct > 0, "no punctured sub-packet");
    check(m_flip > 0, "CORDIC pre-rotation never used");
    check(m_even > 0 && m_odd > 0, "pilot patterns not both used");
    check(m_rob > 0, "rob never happened");
    check(m_stuff > 0, "stuff never happened");
    check(m_swap > 0, "interleaver swap never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
