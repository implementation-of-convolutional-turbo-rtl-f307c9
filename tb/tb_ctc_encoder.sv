// tb_ctc_encoder - self-checking test of the circular rate-1/3 CTC encoder.
//
// Sends back-to-back blocks of random couples of several sizes and compares
// every output couple with a reference model written independently of the
// RTL: the trellis of the decoder's state transition table (states numbered
// S1 + 2*S2 + 4*S3 there), the interleaver formula with the standard's
// P0..P3 parameters, and a circulation state found by trying all eight start
// states. Also checks the pipeline latency of the first block.
module tb_ctc_encoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, valid_in, a, b;
  logic [3:0] blk_id;
  logic ready, valid_out, start_out, a_out, b_out, y1, w1, y2, w2;
  logic [3:0] blk_id_out;
  int checks = 0, failures = 0;

  ctc_encoder dut (.*);

  // transition table: next state and output {Y,W} for state (S1+2S2+4S3) and input AB
  int tnext [8][4] = '{'{0,7,1,6}, '{3,4,2,5}, '{4,3,5,2}, '{7,0,6,1},
                       '{1,6,0,7}, '{2,5,3,4}, '{5,2,4,3}, '{6,1,7,0}};
  int tout  [8][4] = '{'{0,3,3,0}, '{3,0,0,3}, '{2,1,1,2}, '{1,2,2,1},
                       '{0,3,3,0}, '{3,0,0,3}, '{2,1,1,2}, '{1,2,2,1}};
  int sizes [12] = '{24,36,48,72,96,108,120,144,180,192,216,240};
  int tp [12][4] = '{'{5,0,0,0}, '{11,18,0,18}, '{13,24,0,24}, '{11,6,0,6},
                     '{7,48,24,72}, '{11,54,56,2}, '{13,60,0,60}, '{17,74,72,2},
                     '{11,90,0,90}, '{11,96,48,144}, '{13,108,0,108}, '{13,120,60,180}};

  function automatic int pj(int id, int j);
    int n = sizes[id];
    case (j % 4)
      0: return (tp[id][0]*j + 1) % n;
      1: return (tp[id][0]*j + 1 + n/2 + tp[id][1]) % n;
      2: return (tp[id][0]*j + 1 + tp[id][2]) % n;
      default: return (tp[id][0]*j + 1 + n/2 + tp[id][3]) % n;
    endcase
  endfunction

  // encode a sequence from state s0, returning the final state
  function automatic int run(int s0, int n, int sa[], int sb[]);
    int s = s0;
    for (int i = 0; i < n; i++) s = tnext[s][sa[i]*2 + sb[i]];
    return s;
  endfunction

  localparam int NB = 6;
  int ids [NB] = '{0, 11, 3, 5, 1, 9};
  int ea [$], eb [$], ey1 [$], ew1 [$], ey2 [$], ew2 [$], estart [$];
  int eid [$];

  task automatic make_block(int id, output int ia[], output int ib[]);
    int n = sizes[id];
    int na[], nb[], xa[], xb[];
    int sc1, sc2, s, found;
    na = new[n]; nb = new[n]; xa = new[n]; xb = new[n];
    for (int i = 0; i < n; i++) begin na[i] = $urandom % 2; nb[i] = $urandom % 2; end
    for (int j = 0; j < n; j++) begin
      int p = pj(id, j);
      if (p % 2 == 1) begin xa[j] = nb[p]; xb[j] = na[p]; end
      else begin xa[j] = na[p]; xb[j] = nb[p]; end
    end
    found = 0; sc1 = 0; sc2 = 0;
    for (int c = 0; c < 8; c++) if (run(c, n, na, nb) == c) begin sc1 = c; found++; end
    for (int c = 0; c < 8; c++) if (run(c, n, xa, xb) == c) begin sc2 = c; found++; end
    if (found != 2) $display("reference: circulation state not unique");
    s = sc1;
    for (int i = 0; i < n; i++) begin
      int o = tout[s][na[i]*2+nb[i]];
      ea.push_back(na[i]); eb.push_back(nb[i]);
      ey1.push_back(o / 2); ew1.push_back(o % 2);
      estart.push_back(i == 0); eid.push_back(id);
      s = tnext[s][na[i]*2+nb[i]];
    end
    s = sc2;
    for (int i = 0; i < n; i++) begin
      int o = tout[s][xa[i]*2+xb[i]];
      ey2.push_back(o / 2); ew2.push_back(o % 2);
      s = tnext[s][xa[i]*2+xb[i]];
    end
    ia = na; ib = nb;
  endtask

  int cyc = 0, first_in = -1, first_out = -1, nout = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && valid_out) begin
    if (first_out < 0) first_out = cyc;
    checks++;
    if (ea.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      int xa, xb, xy1, xw1, xy2, xw2, xs, xi;
      xa = ea.pop_front(); xb = eb.pop_front(); xy1 = ey1.pop_front(); xw1 = ew1.pop_front();
      xy2 = ey2.pop_front(); xw2 = ew2.pop_front(); xs = estart.pop_front(); xi = eid.pop_front();
      if (a_out !== 1'(xa) || b_out !== 1'(xb) || y1 !== 1'(xy1) || w1 !== 1'(xw1) ||
          y2 !== 1'(xy2) || w2 !== 1'(xw2) || start_out !== 1'(xs) || (xs && blk_id_out != 4'(xi))) begin
        failures++;
        if (failures < 10) $display("mismatch out %0d: got %b%b %b%b %b%b s%b exp %0d%0d %0d%0d %0d%0d s%0d",
          nout, a_out, b_out, y1, w1, y2, w2, start_out, xa, xb, xy1, xw1, xy2, xw2, xs);
      end
    end
    nout++;
  end

  initial begin
    int ia[], ib[];
    int total = 0;
    start = 0; valid_in = 0; a = 0; b = 0; blk_id = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int k = 0; k < NB; k++) begin
      make_block(ids[k], ia, ib);
      total += sizes[ids[k]];
      for (int i = 0; i < sizes[ids[k]]; i++) begin
        @(negedge clk);
        valid_in = 0;
        while (!ready) @(negedge clk);
        if (first_in < 0) first_in = cyc;
        start = (i == 0); blk_id = 4'(ids[k]); valid_in = 1; a = ia[i][0]; b = ib[i][0];
      end
    end
    @(negedge clk); valid_in = 0; start = 0;
    repeat (1200) @(posedge clk);
    checks++;
    if (nout != total) begin failures++; $display("output count %0d expected %0d", nout, total); end
    // first block N=24: output at about 2N + 8 cycles after input
    checks++;
    if (first_out - first_in > 2*24 + 12 || first_out - first_in < 2*24) begin
      failures++; $display("latency %0d", first_out - first_in);
    end
    $display("latency of first block: %0d cycles", first_out - first_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
