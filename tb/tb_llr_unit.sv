// tb_llr_unit - checks the symbol metric unit: for each couple value u,
// T(u) = max over states s of alpha(s) + gamma(u, parity(s,u)) +
// beta(next(s,u)) (trellis from ctc_ref_pkg). Random inputs every cycle;
// the result and the tag must appear exactly 2 cycles later.
module tb_llr_unit;
  import ctc_pkg::*;
  import ctc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid_in = 0, valid_out;
  logic [15:0] tag_in = 0, tag_out;
  sm_t alpha [8];
  sm_t beta [8];
  bm_t gamma [16];
  tl_t t [4];
  llr_unit #(.TAGW(16)) dut (.*);
  int checks = 0, failures = 0;
  initial begin #1_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  function automatic int rev3(int s); return ((s & 1) << 2) | (s & 2) | ((s >> 2) & 1); endfunction
  int exp_t [$];
  int exp_v [$];
  int exp_tag [$];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      valid_in = $urandom_range(0, 3) != 0;
      tag_in = 16'($urandom);
      for (int s = 0; s < 8; s++) begin alpha[s] = sm_t'($urandom); beta[s] = sm_t'($urandom); end
      for (int l = 0; l < 16; l++) gamma[l] = bm_t'($urandom_range(0, 127) - 64);
      for (int u = 0; u < 4; u++) begin
        int best;
        best = -100000;
        for (int s = 0; s < 8; s++) begin
          int v;
          v = int'(alpha[s]) + int'(gamma[u*4 + tout[rev3(s)][u]]) + int'(beta[rev3(tnext[rev3(s)][u])]);
          if (v > best) best = v;
        end
        exp_t.push_back(best);
      end
      exp_v.push_back(valid_in); exp_tag.push_back(tag_in);
      if (c >= 2) begin
        int ev, etg;
        ev = exp_v.pop_front(); etg = exp_tag.pop_front();
        checks++;
        if (valid_out != ev || (ev && int'(tag_out) != etg)) begin failures++; $display("FAIL valid/tag latency"); end
        for (int u = 0; u < 4; u++) begin
          int e;
          e = exp_t.pop_front();
          if (ev) begin
            checks++;
            if (int'(t[u]) != e) begin failures++; if (failures < 10) $display("FAIL c=%0d u=%0d t=%0d exp %0d", c, u, t[u], e); end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
