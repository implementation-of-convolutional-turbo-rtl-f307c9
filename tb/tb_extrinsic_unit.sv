// tb_extrinsic_unit - checks eq. 5.11: Le(u) = T(u) - T(00) - gamma_sys(u)
// saturated to 6 bits, and the hard decisions of eq. 3.42 (A = 1 when
// max(T10, T11) > max(T00, T01), B likewise), one cycle after the input.
module tb_extrinsic_unit;
  import ctc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid_in = 0, valid_out, a_hat, b_hat;
  logic [7:0] tag_in = 0, tag_out;
  tl_t t [4];
  bm_t g01 = 0, g10 = 0, g11 = 0;
  le_t le01, le10, le11;
  extrinsic_unit #(.TAGW(8)) dut (.*);
  int checks = 0, failures = 0, nsat = 0;
  initial begin #1_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  function automatic int sat6(int v); return v > 31 ? 31 : (v < -32 ? -32 : v); endfunction
  function automatic int mx(int a, int b); return a > b ? a : b; endfunction
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      int tv [4];
      int e [3];
      int eg [3];
      int ea, eb;
      @(negedge clk);
      valid_in = 1; tag_in = 8'(c);
      for (int u = 0; u < 4; u++) begin tv[u] = $urandom_range(0, 160) - 80; t[u] = tl_t'(tv[u]); end
      for (int i = 0; i < 3; i++) eg[i] = $urandom_range(0, 60) - 30;
      g01 = bm_t'(eg[0]); g10 = bm_t'(eg[1]); g11 = bm_t'(eg[2]);
      for (int i = 0; i < 3; i++) begin
        e[i] = tv[i + 1] - tv[0] - eg[i];
        if (e[i] != sat6(e[i])) nsat++;
        e[i] = sat6(e[i]);
      end
      ea = mx(tv[2], tv[3]) > mx(tv[0], tv[1]);
      eb = mx(tv[1], tv[3]) > mx(tv[0], tv[2]);
      @(posedge clk); #1;
      checks++;
      if (!valid_out || tag_out != 8'(c) || int'(le01) != e[0] || int'(le10) != e[1] || int'(le11) != e[2] ||
          a_hat != ea[0] || b_hat != eb[0]) begin
        failures++;
        if (failures < 10) $display("FAIL c=%0d le=%0d,%0d,%0d exp %0d,%0d,%0d hat %0d%0d exp %0d%0d",
                                    c, le01, le10, le11, e[0], e[1], e[2], a_hat, b_hat, ea, eb);
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
