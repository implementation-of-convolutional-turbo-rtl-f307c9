// tb_subcarrier_derot - random samples and phases: the output must be
// in * exp(-j*phi) within 3 per component, with its index, exactly 10
// cycles after the input.
module tb_subcarrier_derot;
  import trk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid_in = 0, valid_out;
  samp_t rx_re = 0, rx_im = 0, out_re, out_im;
  ang_t phase = 0;
  sidx_t idx_in = 0, idx_out;
  subcarrier_derot dut (.*);
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #1_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  int q_r [$], q_i [$], q_k [$], q_c [$];
  always @(posedge clk) if (rst_n && valid_out) begin
    int er, ei, ek, ec;
    er = q_r.pop_front(); ei = q_i.pop_front(); ek = q_k.pop_front(); ec = q_c.pop_front();
    checks++;
    if (int'(out_re) - er > 3 || er - int'(out_re) > 3 || int'(out_im) - ei > 3 || ei - int'(out_im) > 3 ||
        int'(idx_out) != ek || cyc - ec != 10) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d,%0d) exp (%0d,%0d) latency %0d", out_re, out_im, er, ei, cyc - ec);
    end
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      int x, y, p;
      real ph;
      @(negedge clk);
      x = $urandom_range(0, 140) - 70; y = $urandom_range(0, 140) - 70; p = $urandom_range(0, 1023) - 512;
      valid_in = $urandom_range(0, 5) != 0;
      rx_re = samp_t'(x); rx_im = samp_t'(y); phase = ang_t'(p); idx_in = sidx_t'(c);
      ph = real'(p) * 3.14159265358979 / 512.0;
      if (valid_in) begin
        q_r.push_back(int'(real'(x) * $cos(ph) + real'(y) * $sin(ph)));
        q_i.push_back(int'(real'(y) * $cos(ph) - real'(x) * $sin(ph)));
        q_k.push_back(int'(sidx_t'(c))); q_c.push_back(cyc);
      end
    end
    @(negedge clk) valid_in = 0;
    repeat (14) @(posedge clk);
    checks++;
    if (q_r.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q_r.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
