// tb_pilot_phase_est - random subcarriers, some flagged as pilots with a
// random pilot value (+1 / -1): only flagged samples produce an output, 11
// cycles later, with the angle of sample * pilot value (within 4 units of
// pi/512) and the subcarrier index.
module tb_pilot_phase_est;
  import trk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid_in = 0, pilot_flag = 0, pilot_neg = 0, valid_out;
  samp_t rx_re = 0, rx_im = 0, mag;
  sidx_t idx_in = 0, idx_out;
  ang_t angle;
  pilot_phase_est dut (.*);
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #1_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  int q_a [$], q_i [$], q_c [$];
  always @(posedge clk) if (rst_n && valid_out) begin
    int ea, ei, ec, d;
    ea = q_a.pop_front(); ei = q_i.pop_front(); ec = q_c.pop_front();
    d = (int'(angle) - ea + 1536) % 1024 - 512;
    checks++;
    if (d > 4 || d < -4 || int'(idx_out) != ei || cyc - ec != 11) begin
      failures++;
      if (failures < 10) $display("FAIL k=%0d angle=%0d exp %0d latency %0d", idx_out, angle, ea, cyc - ec);
    end
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      real ph;
      int  amp, x, y;
      @(negedge clk);
      ph  = real'($urandom_range(0, 1023) - 512) * 3.14159265358979 / 512.0;
      amp = $urandom_range(30, 90);
      x = int'(amp * $cos(ph)); y = int'(amp * $sin(ph));
      valid_in = $urandom_range(0, 3) != 0; pilot_flag = $urandom_range(0, 1); pilot_neg = $urandom_range(0, 1);
      rx_re = samp_t'(pilot_neg ? -x : x); rx_im = samp_t'(pilot_neg ? -y : y);
      idx_in = sidx_t'($urandom_range(0, 1023));
      if (valid_in && pilot_flag) begin
        q_a.push_back(int'($atan2(real'(y), real'(x)) * 512.0 / 3.14159265358979));
        q_i.push_back(int'(idx_in)); q_c.push_back(cyc);
      end
    end
    @(negedge clk) valid_in = 0;
    repeat (15) @(posedge clk);
    checks++;
    if (q_a.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q_a.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
