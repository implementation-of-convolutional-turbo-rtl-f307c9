// tb_ctc_constituent_enc - checks the constituent encoder against the
// trellis of ctc_ref_pkg (its states are numbered S1+2*S2+4*S3, so they are
// bit-reversed here). Random couples, random loads of the start state
// through init; outputs and state are checked one cycle after each input.
module tb_ctc_constituent_enc;
  import ctc_pkg::*;
  import ctc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, valid_in = 0, a = 0, b = 0, y, w, valid_out;
  state_t init_stat = 0, state;
  ctc_constituent_enc dut (.*);

  int checks = 0, failures = 0;
  initial begin #1_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic int rev3(int s); return ((s & 1) << 2) | (s & 2) | ((s >> 2) & 1); endfunction

  initial begin
    int s, o, lat_bad;
    repeat (2) @(posedge clk);
    rst_n = 1;
    s = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      valid_in = ($urandom_range(0, 3) != 0);
      init = ($urandom_range(0, 15) == 0);
      init_stat = 3'($urandom_range(0, 7));
      a = $urandom_range(0, 1); b = $urandom_range(0, 1);
      if (init) s = init_stat;
      if (valid_in) begin
        o = tout[rev3(s)][a*2 + b];
        s = rev3(tnext[rev3(s)][a*2 + b]);
      end
      @(posedge clk); #1;
      checks++;
      if (valid_out != valid_in) begin failures++; $display("FAIL valid_out latency at %0d", i); end
      if (valid_in) begin
        checks++;
        if (y != o / 2 || w != o % 2 || int'(state) != s) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d y=%0d w=%0d st=%0d exp %0d %0d %0d", i, y, w, state, o/2, o%2, s);
        end
      end
      init = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
