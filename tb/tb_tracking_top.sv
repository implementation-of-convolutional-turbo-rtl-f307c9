// tb_tracking_top - self-checking testbench of the tracking chain.
//
// Each test symbol carries QPSK data (amplitude 60) and BPSK pilots on the
// FUSC pilot positions, all rotated by a known phase ramp
// phi(k) = s*k + b (pi/512 units). The testbench checks:
//   - the slope a against the document's approximation a ~ s*sum(k^2)/2^22
//     (within half a step of the 2-fraction-bit coefficient) and b against
//     (82*b + s*sum(k)) * (1/128 + 1/256) within 6 units;
//   - the rob / stuff decision (|a*1023| >= 2048 in quarter units);
//   - every output sample against in * exp(-j*(a*k/4 + b)) computed from the
//     coefficients the design reported, within +-3;
//   - timing: in_ready low from the last input until the last output, the
//     first output within 40 cycles of the last input, 1024 outputs in
//     consecutive cycles.
// Symbols alternate even/odd so both pilot patterns are used.
module tb_tracking_top;
  import trk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   in_valid = 0, in_first = 0, in_odd = 0, in_pilot_neg = 0;
  samp_t  in_re = 0, in_im = 0;
  logic   in_ready, out_valid, coef_valid, rob, stuff;
  samp_t  out_re, out_im;
  sidx_t  out_idx;
  slope_t a_coef;
  ang_t   b_coef;

  tracking_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #20_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog");
    $finish;
  end

  samp_t  sym_re [1024];
  samp_t  sym_im [1024];
  int     n_out, first_out_cyc, last_in_cyc, prev_out_cyc, gap_err, cyc;
  int     n_rob = 0, n_stuff = 0, n_keep = 0;
  slope_t a_seen;
  ang_t   b_seen;
  logic   got_coef;
  always @(posedge clk) cyc <= cyc + 1;
  initial cyc = 0;

  // output monitor
  always @(posedge clk) begin
    if (rst_n && coef_valid) begin
      a_seen   <= a_coef;
      b_seen   <= b_coef;
      got_coef <= 1'b1;
    end
    if (rst_n && rob) begin n_rob++; $display("rob at %0d a=%0d", cyc, a_coef); end
    if (rst_n && stuff) begin n_stuff++; $display("stuff at %0d a=%0d", cyc, a_coef); end
    if (rst_n && out_valid) begin
      real ph, er, ei;
      int  p, e_re, e_im;
      p  = int'(out_idx) + 512;
      ph = (real'(a_seen) * real'(int'(out_idx)) / 4.0 + real'(b_seen)) * 3.14159265358979 / 512.0;
      er = real'(sym_re[p]) * $cos(ph) + real'(sym_im[p]) * $sin(ph);
      ei = real'(sym_im[p]) * $cos(ph) - real'(sym_re[p]) * $sin(ph);
      e_re = int'(er);
      e_im = int'(ei);
      check(int'(out_re) - e_re <= 3 && e_re - int'(out_re) <= 3 &&
            int'(out_im) - e_im <= 3 && e_im - int'(out_im) <= 3,
            $sformatf("k=%0d out=(%0d,%0d) exp=(%0d,%0d)", out_idx, out_re, out_im, e_re, e_im));
      check(in_ready == 1'b0 || n_out >= 1024 - 12, "in_ready high during output");
      if (n_out == 0) first_out_cyc = cyc;
      else if (cyc != prev_out_cyc + 1) gap_err++;
      prev_out_cyc = cyc;
      n_out++;
    end
  end

  task automatic run_symbol(input real s, input real b, input bit odd);
    real  ph, sum_k, sum_k2;
    int   k, exp_a_q, np;
    real  exp_a, exp_b;
    bit   neg;
    sum_k = 0; sum_k2 = 0; np = 0;
    n_out = 0; gap_err = 0; got_coef = 0;
    for (int i = 0; i < 1024; i++) begin
      real dr, di;
      k = i - 512;
      ph = (s * k + b) * 3.14159265358979 / 512.0;
      if (is_pilot(sidx_t'(k), odd)) begin
        neg = $urandom_range(0, 1);
        dr = neg ? -60.0 : 60.0; di = 0.0;
        sum_k += k; sum_k2 += real'(k) * k; np++;
      end else begin
        dr = $urandom_range(0, 1) ? 42.0 : -42.0;
        di = $urandom_range(0, 1) ? 42.0 : -42.0;
      end
      // transmitted value times exp(j*ph); keep the pilot sign in a table
      sym_re[i] = samp_t'(int'(dr * $cos(ph) - di * $sin(ph)));
      sym_im[i] = samp_t'(int'(dr * $sin(ph) + di * $cos(ph)));
      pneg[i] = neg && is_pilot(sidx_t'(k), odd);
    end
    check(np == 82, $sformatf("pilot count %0d", np));
    for (int i = 0; i < 1024; i++) begin
      in_valid <= 1; in_first <= (i == 0); in_odd <= odd; in_pilot_neg <= pneg[i];
      in_re <= sym_re[i]; in_im <= sym_im[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    last_in_cyc = cyc;
    in_valid <= 0; in_first <= 0;
    while (n_out < 1024) @(posedge clk);
    repeat (3) @(posedge clk);
    exp_a = s * sum_k2 / 4194304.0;
    exp_b = (82.0 * b + s * sum_k) * (1.0 / 128.0 + 1.0 / 256.0);
    exp_a_q = int'(exp_a * 4.0);
    check(got_coef, "no coef_valid");
    check(real'(a_seen) >= exp_a * 4.0 - 1.5 && real'(a_seen) <= exp_a * 4.0 + 0.5,
          $sformatf("a=%0d expected ~%0.2f (s=%0.2f)", a_seen, exp_a * 4.0, s));
    check(real'(b_seen) >= exp_b - 6.0 && real'(b_seen) <= exp_b + 6.0,
          $sformatf("b=%0d expected ~%0.1f", b_seen, exp_b));
    check(first_out_cyc - last_in_cyc <= 40 && first_out_cyc > last_in_cyc,
          $sformatf("first output latency %0d", first_out_cyc - last_in_cyc));
    check(gap_err == 0, "outputs not consecutive");
    $display("symbol s=%0.2f b=%0.1f odd=%0d: a=%0d b=%0d latency=%0d", s, b, odd,
             a_seen, b_seen, first_out_cyc - last_in_cyc);
    if (exp_a_q != 0) ;
  endtask

  logic pneg [1024];

  initial begin
    int r0, s0, r1, s1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run_symbol(0.0, 0.0, 0);
    check(n_rob == 0 && n_stuff == 0, "rob/stuff at zero offset");
    run_symbol(0.5, 30.0, 1);
    check(n_rob == 0 && n_stuff == 0, "rob/stuff at small slope");
    r0 = n_rob;
    run_symbol(1.0, -20.0, 0);
    check(n_rob == r0 + 1, "no rob at slope +1");
    s0 = n_stuff;
    run_symbol(-1.0, 60.0, 1);
    check(n_stuff == s0 + 1, "no stuff at slope -1");
    r1 = n_rob; s1 = n_stuff;
    run_symbol(-0.25, -100.0, 0);
    check(n_rob == r1 && n_stuff == s1, "rob/stuff at slope -0.25");
    $display("rob=%0d stuff=%0d", n_rob, n_stuff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
