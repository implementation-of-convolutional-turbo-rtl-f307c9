// tb_cordic - checks the pipelined CORDIC against floating point:
// vectoring mode returns the angle of the input (within 4 units of pi/512:
// the last micro-rotation is 1.3 units and the arctan table is rounded to
// whole units; inputs of magnitude >= 24 as the pilots are) and the
// magnitude (within 3); rotation mode returns in * exp(j*z) (within
// 3 per component), over all four quadrants, so the pi pre-rotation is
// exercised. One sample per cycle; every result must appear exactly 10
// cycles after its input, with its tag.
module tb_cordic;
  import trk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid_in = 0, valid_out;
  cordic_mode_t mode = CORDIC_ROTATE;
  samp_t real_in = 0, imag_in = 0, real_out, imag_out;
  ang_t z_in = 0, z_out;
  logic [11:0] tag_in = 0, tag_out;
  cordic #(.TAGW(12)) dut (.*);
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #2_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  localparam real PI = 3.14159265358979;
  int q_m [$], q_x [$], q_y [$], q_z [$], q_c [$];
  always @(posedge clk) if (rst_n && valid_out) begin
    int m, x, y, z, c, er, ei, ez, dz;
    real ph, a;
    m = q_m.pop_front(); x = q_x.pop_front(); y = q_y.pop_front(); z = q_z.pop_front(); c = q_c.pop_front();
    checks++;
    if (cyc - c != 10 || int'(tag_out) != (c & 12'hfff)) begin failures++; $display("FAIL latency %0d", cyc - c); end
    checks++;
    if (m == 1) begin
      a  = $atan2(real'(y), real'(x)) * 512.0 / PI;
      ez = int'(a);
      dz = (int'(z_out) - ez + 1536) % 1024 - 512;
      er = int'($sqrt(real'(x * x + y * y)));
      if (dz > 4 || dz < -4 || int'(real_out) - er > 3 || er - int'(real_out) > 3) begin
        failures++;
        if (failures < 10) $display("FAIL vector (%0d,%0d): z=%0d mag=%0d exp %0d %0d", x, y, z_out, real_out, ez, er);
      end
    end else begin
      ph = real'(z) * PI / 512.0;
      er = int'(real'(x) * $cos(ph) - real'(y) * $sin(ph));
      ei = int'(real'(x) * $sin(ph) + real'(y) * $cos(ph));
      if (int'(real_out) - er > 3 || er - int'(real_out) > 3 || int'(imag_out) - ei > 3 || ei - int'(imag_out) > 3) begin
        failures++;
        if (failures < 10) $display("FAIL rotate (%0d,%0d) by %0d: (%0d,%0d) exp (%0d,%0d)", x, y, z, real_out, imag_out, er, ei);
      end
    end
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      int x, y, z, m;
      @(negedge clk);
      m = $urandom_range(0, 1);
      if (m == 1) begin
        x = $urandom_range(0, 150) - 75; y = $urandom_range(0, 150) - 75; z = 0;
        while (x * x + y * y < 24 * 24) begin
          x = $urandom_range(0, 150) - 75; y = $urandom_range(0, 150) - 75;
        end
      end else begin
        x = $urandom_range(0, 140) - 70; y = $urandom_range(0, 140) - 70; z = $urandom_range(0, 1023) - 512;
      end
      valid_in = ($urandom_range(0, 7) != 0);
      mode = cordic_mode_t'(m); real_in = samp_t'(x); imag_in = samp_t'(y); z_in = ang_t'(z);
      tag_in = 12'(cyc);
      if (valid_in) begin q_m.push_back(m); q_x.push_back(x); q_y.push_back(y); q_z.push_back(z); q_c.push_back(cyc); end
    end
    @(negedge clk) valid_in = 0;
    repeat (15) @(posedge clk);
    checks++;
    if (q_m.size() != 0) begin failures++; $display("FAIL %0d results missing", q_m.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
