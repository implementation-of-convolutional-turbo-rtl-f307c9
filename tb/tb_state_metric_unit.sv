// tb_state_metric_unit - checks the forward (alpha) and backward (beta)
// add-compare-select units against the trellis of ctc_ref_pkg: each new
// metric is the maximum over the four incoming (outgoing) branches of
// metric + gamma, minus the metric of state 0 (eq. 5.9/5.10
// normalisation), saturated to 8 bits. Random metrics and branch metrics.
module tb_state_metric_unit;
  import ctc_pkg::*;
  import ctc_ref_pkg::*;
  sm_t m_in [8];
  bm_t gamma [16];
  sm_t fwd [8];
  sm_t bwd [8];
  state_metric_unit #(.BACKWARD(1'b0)) u_fwd (.m_in, .gamma, .m_out(fwd));
  state_metric_unit #(.BACKWARD(1'b1)) u_bwd (.m_in, .gamma, .m_out(bwd));
  int checks = 0, failures = 0;
  initial begin #1_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  function automatic int rev3(int s); return ((s & 1) << 2) | (s & 2) | ((s >> 2) & 1); endfunction
  function automatic int sat8(int v); return v > 127 ? 127 : (v < -128 ? -128 : v); endfunction
  initial begin
    int nsat;
    nsat = 0;
    for (int t = 0; t < 3000; t++) begin
      int m [8];
      int g [16];
      int ef [8];
      int eb [8];
      int rng;
      rng = (t % 3 == 0) ? 127 : 40;
      for (int s = 0; s < 8; s++) begin m[s] = $urandom_range(0, 2 * rng) - rng; m_in[s] = sm_t'(m[s]); end
      for (int l = 0; l < 16; l++) begin g[l] = $urandom_range(0, 127) - 64; gamma[l] = bm_t'(g[l]); end
      for (int s = 0; s < 8; s++) begin ef[s] = -100000; eb[s] = -100000; end
      for (int s = 0; s < 8; s++)
        for (int ab = 0; ab < 4; ab++) begin
          int nx, o;
          nx = rev3(tnext[rev3(s)][ab]);
          o  = tout[rev3(s)][ab];
          if (m[s] + g[ab*4 + o] - m[0] > ef[nx]) ef[nx] = m[s] + g[ab*4 + o] - m[0];
          if (m[nx] + g[ab*4 + o] - m[0] > eb[s]) eb[s] = m[nx] + g[ab*4 + o] - m[0];
        end
      #1;
      for (int s = 0; s < 8; s++) begin
        checks += 2;
        if (ef[s] != sat8(ef[s]) || eb[s] != sat8(eb[s])) nsat++;
        if (int'(fwd[s]) != sat8(ef[s])) begin failures++; if (failures < 10) $display("FAIL fwd s=%0d %0d exp %0d", s, fwd[s], ef[s]); end
        if (int'(bwd[s]) != sat8(eb[s])) begin failures++; if (failures < 10) $display("FAIL bwd s=%0d %0d exp %0d", s, bwd[s], eb[s]); end
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("saturated metrics: %0d", nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
