// tb_cordic_stage - checks one CORDIC micro-rotation for every iteration
// number and both modes: x' = x - d*(y>>>i), y' = y + d*(x>>>i),
// z' = z - d*atan(2^-i), with d from the sign of z (rotation) or from the
// XOR of the signs of x and y (vectoring, Table 6-2 of the document).
// Outputs one cycle after the input.
module tb_cordic_stage;
  import trk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid_in = 0, valid_out;
  cordic_mode_t mode = CORDIC_ROTATE;
  logic [2:0] iter_no = 0;
  cx_t real_in = 0, imag_in = 0, real_out, imag_out;
  ang_t z_in = 0, z_out;
  cordic_stage dut (.*);
  int checks = 0, failures = 0;
  int at [8] = '{128, 76, 40, 20, 10, 5, 3, 1};
  initial begin #1_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      int x, y, z, i, d, ex, ey, ez;
      @(negedge clk);
      x = $urandom_range(0, 1600) - 800; y = $urandom_range(0, 1600) - 800;
      z = $urandom_range(0, 600) - 300; i = $urandom_range(0, 7);
      mode = cordic_mode_t'($urandom_range(0, 1));
      valid_in = 1; iter_no = 3'(i); real_in = cx_t'(x); imag_in = cx_t'(y); z_in = ang_t'(z);
      if (mode == CORDIC_VECTOR) d = ((x < 0) != (y < 0)) ? 1 : -1;
      else d = (z >= 0) ? 1 : -1;
      ex = x - d * (y >>> i); ey = y + d * (x >>> i); ez = z - d * at[i];
      @(posedge clk); #1;
      checks++;
      if (!valid_out || int'(real_out) != ex || int'(imag_out) != ey || int'(z_out) != ez) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d mode=%0d out=(%0d,%0d,%0d) exp (%0d,%0d,%0d)", i, mode, real_out, imag_out, z_out, ex, ey, ez);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
