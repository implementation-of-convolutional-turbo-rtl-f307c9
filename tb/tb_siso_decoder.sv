// tb_siso_decoder - the component decoder on its own, decoding the first
// constituent code (A, B, Y1, W1) of random blocks without a-priori values:
//   - the testbench answers every read request rd_k exactly IN_LAT = 2
//     cycles later from its arrays;
//   - every couple index must come out exactly once per pass;
//   - noiseless blocks: all hard decisions right, and sc_out must be the
//     circulation state of the block (in the 4*S1+2*S2+S3 numbering);
//     the second pass, with sc_in fed back, must again decode correctly and
//     for couples 10 the extrinsic Le(1,0) must be the largest and positive
//     in at least 90 % of them (the extrinsic part excludes the systematic
//     values, so a few weak or tied ones are allowed);
//   - noisy blocks (sigma 1.0): hard decisions no worse than the raw ones;
//   - timing: done must come (ceil(N/32) + 1) * 32 + 8 cycles (+-4) after
//     start.
module tb_siso_decoder;
  import ctc_pkg::*;
  import ctc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, sc_valid = 0, rd_en, valid_out, a_hat, b_hat, busy, done;
  blk_id_t blk_id = 0;
  state_t sc_in = 0, sc_out;
  idx_t rd_k, k_out;
  rx_t ra = 0, rb = 0, ry = 0, rw = 0;
  le_t le01 = 0, le10 = 0, le11 = 0, le01_out, le10_out, le11_out;
  siso_decoder dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #5_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  function automatic int rev3(int s); return ((s & 1) << 2) | (s & 2) | ((s >> 2) & 1); endfunction

  int sa [240], sb [240], sy [240], sw [240];
  int q_k [$];
  always @(posedge clk) begin
    if (rd_en) q_k.push_back(int'(rd_k)); else q_k.push_back(-1);
    if (q_k.size() > 1) begin
      int k;
      k = q_k.pop_front();
      if (k >= 0) begin ra <= rx_t'(sa[k]); rb <= rx_t'(sb[k]); ry <= rx_t'(sy[k]); rw <= rx_t'(sw[k]); end
    end
  end
  // rd_en seen at edge e -> values driven from edge e+1, sampled at edge e+2: IN_LAT = 2

  int got_a [240], got_b [240], seen [240], le_ok;
  always @(posedge clk) if (rst_n && valid_out) begin
    got_a[k_out] = a_hat; got_b[k_out] = b_hat; seen[k_out]++;
    if (got_a[k_out] == 1 && got_b[k_out] == 0 && !(le10_out > le01_out && le10_out > 0)) le_ok++;
  end

  task automatic pass(int id, int na[], int nb[], bit use_sc, int sc, output int errs, output int t);
    int n, t0, miss;
    n = sizes[id];
    for (int i = 0; i < n; i++) seen[i] = 0;
    @(negedge clk); start = 1; blk_id = 4'(id); sc_valid = use_sc; sc_in = state_t'(sc);
    t0 = cyc + 1;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    t = cyc - t0;
    errs = 0; miss = 0;
    for (int i = 0; i < n; i++) begin
      if (seen[i] != 1) miss++;
      if (got_a[i] != na[i] || got_b[i] != nb[i]) errs++;
    end
    checks++;
    if (miss != 0) begin failures++; $display("FAIL N=%0d: %0d couples not output exactly once", n, miss); end
    checks++;
    if (t < ((n + 31) / 32 + 1) * 32 + 8 - 4 || t > ((n + 31) / 32 + 1) * 32 + 8 + 4) begin
      failures++; $display("FAIL N=%0d pass took %0d cycles", n, t);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 16; t++) begin
      int id, n, sc, errs, cy, raw, errs2;
      int na[], nb[], y1[], w1[], y2[], w2[];
      real sigma;
      id = (t < 12) ? t : $urandom_range(0, 11);
      n = sizes[id];
      sigma = (t < 12) ? 0.01 : 1.0;
      na = new[n]; nb = new[n];
      for (int i = 0; i < n; i++) begin na[i] = $urandom_range(0, 1); nb[i] = $urandom_range(0, 1); end
      encode(id, na, nb, y1, w1, y2, w2);
      sc = 0;
      for (int c = 0; c < 8; c++) if (run(c, n, na, nb) == c) sc = rev3(c);
      raw = 0;
      for (int i = 0; i < n; i++) begin
        sa[i] = soft_val(na[i], 3.0, sigma); sb[i] = soft_val(nb[i], 3.0, sigma);
        sy[i] = soft_val(y1[i], 3.0, sigma); sw[i] = soft_val(w1[i], 3.0, sigma);
        if ((sa[i] > 0) != (na[i] == 1) || (sb[i] > 0) != (nb[i] == 1)) raw++;
      end
      le_ok = 0;
      pass(id, na, nb, 0, 0, errs, cy);
      checks++;
      if (sigma < 0.1) begin
        if (errs != 0 || int'(sc_out) != sc) begin
          failures++; $display("FAIL N=%0d noiseless: %0d errors, sc_out=%0d exp %0d", n, errs, sc_out, sc);
        end
      end else if (errs > raw) begin
        failures++; $display("FAIL N=%0d noisy: %0d errors > raw %0d", n, errs, raw);
      end
      pass(id, na, nb, 1, int'(sc_out), errs2, cy);
      checks++;
      if (sigma < 0.1 && (errs2 != 0 || le_ok * 10 >= n)) begin
        failures++; $display("FAIL N=%0d second pass: %0d errors, %0d extrinsic signs wrong", n, errs2, le_ok);
      end
      $display("N=%0d sigma=%0.2f raw=%0d pass1=%0d pass2=%0d cycles=%0d", n, sigma, raw, errs, errs2, cy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
