// tb_phase_coef - checks the least-squares coefficient unit on random
// pilot angles at the 82 FUSC pilot positions (even and odd symbols):
//   b must equal (S1 >>> 7) + (S1 >>> 8), S1 = sum(phi), exactly;
//   a must be floor(S2 / 2^20) or one less, S2 = sum(k*phi): the truncated
//   multiplier drops only non-negative partial products worth less than
//   2^20 over 82 pilots.
// coef_valid must follow finish by one cycle; finish is also given in the
// same cycle as the last pilot.
module tb_phase_coef;
  import trk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, valid_in = 0, finish = 0, coef_valid;
  sidx_t k = 0;
  ang_t phi = 0;
  slope_t a_coef;
  ang_t b_coef;
  phase_coef dut (.*);
  int checks = 0, failures = 0, n_low = 0;
  initial begin #2_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      longint s1, s2;
      int ea_hi, eb, slope10, off, np;
      bit odd, together;
      odd = t % 2; together = (t % 3 == 0);
      slope10 = $urandom_range(0, 60) - 30;     // slope * 10
      off = $urandom_range(0, 400) - 200;
      s1 = 0; s2 = 0; np = 0;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int x = -512; x < 512; x++)
        if (is_pilot(sidx_t'(x), odd)) begin
          int p;
          p = (slope10 * x) / 10 + off + $urandom_range(0, 20) - 10;
          p = ((p + 512) % 1024 + 1024) % 1024 - 512;
          s1 += p; s2 += longint'(x) * p; np++;
          @(negedge clk);
          valid_in = 1; k = sidx_t'(x); phi = ang_t'(p);
          finish = together && (np == 82);
          if (np == 82 && !together) begin @(negedge clk); valid_in = 0; finish = 1; end
        end
      @(negedge clk); valid_in = 0; finish = 0;
      #1;
      ea_hi = int'((s2 - ((s2 % 1048576 + 1048576) % 1048576)) / 1048576);
      eb = int'((s1 >>> 7) + (s1 >>> 8));
      eb = ((eb + 512) % 1024 + 1024) % 1024 - 512;
      checks += 2;
      if (!coef_valid) begin failures++; $display("FAIL coef_valid not one cycle after finish"); end
      if (!(int'(a_coef) == ((ea_hi + 16) % 32 + 32) % 32 - 16 || int'(a_coef) == ((ea_hi + 15) % 32 + 32) % 32 - 16) ||
          int'(b_coef) != eb) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d a=%0d exp %0d(-1) b=%0d exp %0d", t, a_coef, ea_hi, b_coef, eb);
      end
      if (int'(a_coef) != ea_hi) n_low++;
    end
    $display("a one below the exact floor in %0d of 200 symbols (truncation)", n_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
