// tb_ctc_intlv_lut - checks the table interleaver against the standard's
// formula (ctc_ref_pkg::pj) for every j of every block size; the read is
// registered, so p is compared one cycle after j is presented.
module tb_ctc_intlv_lut;
  import ctc_pkg::*;
  import ctc_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  blk_id_t blk_id = 0;
  idx_t j = 0, p;
  ctc_intlv_lut dut (.*);
  int checks = 0, failures = 0;
  initial begin #1_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    for (int id = 0; id < 12; id++)
      for (int k = 0; k < sizes[id]; k++) begin
        @(negedge clk); blk_id = 4'(id); j = idx_t'(k);
        @(posedge clk); #1;
        checks++;
        if (int'(p) != pj(id, k)) begin
          failures++;
          if (failures < 10) $display("FAIL id=%0d j=%0d p=%0d exp %0d", id, k, p, pj(id, k));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
