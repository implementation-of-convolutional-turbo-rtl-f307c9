// tb_ctc_intlv_addr_gen - checks the recursive interleaver address
// generator against the closed formula of the standard (ctc_ref_pkg::pj)
// for all twelve block sizes, with random step gaps, back-to-back blocks
// (start in the cycle of the last step) and one address per step, valid
// exactly one cycle after the step.
module tb_ctc_intlv_addr_gen;
  import ctc_pkg::*;
  import ctc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, step = 0, valid_out, last;
  blk_id_t blk_id = 0;
  idx_t addr_lin, addr_int;
  ctc_intlv_addr_gen dut (.*);

  int checks = 0, failures = 0;
  initial begin #2_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  int exp_id[$], exp_j[$];
  logic step_q;
  always @(posedge clk) step_q <= step;
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (valid_out != step_q) begin failures++; $display("FAIL valid_out not one cycle after step"); end
    if (valid_out) begin
      int id, j;
      id = exp_id.pop_front(); j = exp_j.pop_front();
      checks++;
      if (int'(addr_int) != pj(id, j) || int'(addr_lin) != j || last != (j == sizes[id] - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL id=%0d j=%0d got %0d/%0d last=%0d exp %0d", id, j, addr_lin, addr_int, last, pj(id, j));
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 2; r++)
      for (int id = 0; id < 12; id++) begin
        int n;
        n = sizes[id];
        @(negedge clk);
        if (!(r == 1 && id > 0)) begin start = 1; blk_id = 4'(id); step = 0; @(negedge clk); end
        start = 0;
        for (int j = 0; j < n; j++) begin
          while (r == 0 && $urandom_range(0, 3) == 0) begin step = 0; @(negedge clk); end
          step = 1; exp_id.push_back(id); exp_j.push_back(j);
          if (r == 1 && j == n - 1 && id < 11) begin start = 1; blk_id = 4'(id + 1); end
          if (j < n - 1) @(negedge clk);
        end
        if (!(r == 1 && id < 11)) begin @(negedge clk); step = 0; end
        else step = 1;
        if (r == 1 && id < 11) begin @(posedge clk); #1; start = 0; step = 0; end
      end
    repeat (4) @(posedge clk);
    checks++;
    if (exp_id.size() != 0) begin failures++; $display("FAIL %0d addresses missing", exp_id.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
