// tb_branch_metric_unit - checks the 16 branch metrics of eq. 5.2 (label
// {a, b, y, w}: sum of the received values of the bits that are 1 plus the
// a-priori value of the couple (a, b), gamma(0000) = 0) for random soft
// inputs including the extreme values.
module tb_branch_metric_unit;
  import ctc_pkg::*;
  rx_t ra, rb, ry, rw;
  le_t le01, le10, le11;
  bm_t gamma [16];
  branch_metric_unit dut (.*);
  int checks = 0, failures = 0;
  initial begin #1_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    for (int t = 0; t < 3000; t++) begin
      int r [4];
      int le [4];
      for (int i = 0; i < 4; i++) r[i] = (t < 2) ? (t ? 7 : -8) : $urandom_range(0, 15) - 8;
      le[0] = 0;
      for (int i = 1; i < 4; i++) le[i] = (t < 2) ? (t ? 31 : -32) : $urandom_range(0, 63) - 32;
      ra = rx_t'(r[0]); rb = rx_t'(r[1]); ry = rx_t'(r[2]); rw = rx_t'(r[3]);
      le01 = le_t'(le[1]); le10 = le_t'(le[2]); le11 = le_t'(le[3]);
      #1;
      for (int l = 0; l < 16; l++) begin
        int e;
        e = le[l / 4];
        for (int k = 0; k < 4; k++) if ((l >> (3 - k)) & 1) e += r[k];
        checks++;
        if (int'(gamma[l]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL l=%0d gamma=%0d exp %0d", l, gamma[l], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
