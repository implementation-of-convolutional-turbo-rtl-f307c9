// tb_subblk_addr_gen - checks the sub-block interleaver address generator
// against T_k = 2^m (k mod J) + BRO_m(floor(k/J)) with out-of-range values
// discarded, for every block size. Because of the look-ahead skip one valid
// address must come out for every step, one cycle later, never a bubble.
module tb_subblk_addr_gen;
  import ctc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, step = 0, valid_out, last;
  blk_id_t blk_id = 0;
  idx_t addr, addr_lin;
  subblk_addr_gen dut (.*);

  int checks = 0, failures = 0;
  initial begin #2_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  int nt [12] = '{24,36,48,72,96,108,120,144,180,192,216,240};
  int mt [12] = '{3,4,4,5,5,5,6,6,6,6,6,7};
  int jt [12] = '{3,3,3,3,3,4,2,3,3,3,4,2};
  function automatic int bro(int v, int m);
    int r = 0;
    for (int i = 0; i < m; i++) r |= ((v >> i) & 1) << (m - 1 - i);
    return r;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int id = 0; id < 12; id++) begin
      int k, t;
      @(negedge clk); start = 1; blk_id = 4'(id);
      @(negedge clk); start = 0;
      k = 0;
      for (int i = 0; i < nt[id]; i++) begin
        do begin t = (1 << mt[id]) * (k % jt[id]) + bro(k / jt[id], mt[id]); k++; end while (t >= nt[id]);
        step = 1;
        @(posedge clk); #1;
        checks++;
        if (!valid_out || int'(addr) != t || int'(addr_lin) != i || last != (i == nt[id] - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d i=%0d v=%0d addr=%0d exp %0d", nt[id], i, valid_out, addr, t);
        end
        if ($urandom_range(0, 4) == 0) begin step = 0; @(posedge clk); #1; end
      end
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
