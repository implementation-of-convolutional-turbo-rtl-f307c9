// tb_data_phase_est - for random coefficients, the phases of all 1024
// subcarriers must be ((a*k) >>> 2) + b modulo 2*pi, k = -512..511 in
// order, each one cycle after its enable (random enable gaps), last on
// k = 511 and nothing after it.
module tb_data_phase_est;
  import trk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, en = 0, valid_out, last;
  slope_t a_coef = 0;
  ang_t b_coef = 0, phase;
  sidx_t idx;
  data_phase_est dut (.*);
  int checks = 0, failures = 0;
  initial begin #5_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int a, b, k, e;
      a = $urandom_range(0, 31) - 16; b = $urandom_range(0, 1023) - 512;
      @(negedge clk); start = 1; a_coef = slope_t'(a); b_coef = ang_t'(b);
      @(negedge clk); start = 0;
      k = -512;
      while (k < 512 + 3) begin
        en = ($urandom_range(0, 4) != 0);
        @(posedge clk); #1;
        checks++;
        if (en && k < 512) begin
          e = ((a * k) >>> 2) + b;
          e = ((e + 512) % 1024 + 1024) % 1024 - 512;
          if (!valid_out || int'(idx) != k || int'(phase) != e || last != (k == 511)) begin
            failures++;
            if (failures < 10) $display("FAIL k=%0d v=%0d idx=%0d phase=%0d exp %0d", k, valid_out, idx, phase, e);
          end
          k++;
        end else begin
          if (valid_out) begin failures++; $display("FAIL output without enable"); end
          if (en) k++;
        end
        @(negedge clk);
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
