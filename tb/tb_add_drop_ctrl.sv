// tb_add_drop_ctrl - all 32 slope values: rob exactly when the phase span
// a*1023/4 reaches +pi (512 units), stuff when it reaches -pi, nothing
// otherwise; decisions one cycle after coef_valid and only then.
module tb_add_drop_ctrl;
  import trk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic coef_valid = 0, valid_out, rob, stuff;
  slope_t a_coef = 0;
  add_drop_ctrl dut (.*);
  int checks = 0, failures = 0, n_rob = 0, n_stuff = 0;
  initial begin #1_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++)
      for (int a = -16; a < 16; a++) begin
        bit er, es, v;
        v = (r != 1);
        @(negedge clk); coef_valid = v; a_coef = slope_t'(a);
        er = v && (real'(a) * 1023.0 / 4.0 >= 512.0);
        es = v && (real'(a) * 1023.0 / 4.0 <= -512.0);
        @(posedge clk); #1;
        checks++;
        if (valid_out != v || rob != er || stuff != es) begin
          failures++;
          $display("FAIL a=%0d v=%0d rob=%0d stuff=%0d exp %0d %0d", a, v, rob, stuff, er, es);
        end
        n_rob += rob; n_stuff += stuff;
      end
    $display("rob %0d stuff %0d", n_rob, n_stuff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
