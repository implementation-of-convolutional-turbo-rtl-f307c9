// tb_subblock_interleaver - checks the six sub-block interleavers: output
// word i = input word AD_i (all six bits use the same address), blocks of
// mixed sizes back to back with ready respected. Timing: first output word
// 3 cycles after the last input word when idle; words of a block leave in
// consecutive cycles.
module tb_subblock_interleaver;
  import ctc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, valid_in = 0, ready, valid_out, start_out;
  blk_id_t blk_id = 0, blk_id_out;
  logic [5:0] din = 0, dout;
  subblock_interleaver dut (.*);

  int checks = 0, failures = 0, cyc = 0, n_wait = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #5_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  int nt [12] = '{24,36,48,72,96,108,120,144,180,192,216,240};
  int mt [12] = '{3,4,4,5,5,5,6,6,6,6,6,7};
  int jt [12] = '{3,3,3,3,3,4,2,3,3,3,4,2};
  function automatic int bro(int v, int m);
    int r = 0;
    for (int i = 0; i < m; i++) r |= ((v >> i) & 1) << (m - 1 - i);
    return r;
  endfunction

  int exp_d[$], exp_f[$], exp_id[$];
  int last_in_cyc, first_out_cyc, prev_out, gaps;
  bit measure;
  always @(posedge clk) if (rst_n && valid_out) begin
    int ed, ef, ei;
    ed = exp_d.pop_front(); ef = exp_f.pop_front(); ei = exp_id.pop_front();
    checks++;
    if (int'(dout) != ed || start_out != ef || (ef && int'(blk_id_out) != ei)) begin
      failures++;
      if (failures < 10) $display("FAIL dout=%0d exp %0d start %0d/%0d", dout, ed, start_out, ef);
    end
    if (start_out && measure) begin first_out_cyc = cyc; measure = 0; end
    if (!start_out && cyc != prev_out + 1) gaps++;
    prev_out = cyc;
  end

  task automatic send(int id, bit idle_check);
    int n, k, t;
    int d[];
    n = nt[id];
    d = new[n];
    for (int i = 0; i < n; i++) d[i] = $urandom_range(0, 63);
    k = 0;
    for (int i = 0; i < n; i++) begin
      do begin t = (1 << mt[id]) * (k % jt[id]) + bro(k / jt[id], mt[id]); k++; end while (t >= n);
      exp_d.push_back(d[t]); exp_f.push_back(i == 0); exp_id.push_back(id);
    end
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      while (!ready) begin valid_in = 0; start = 0; n_wait++; @(negedge clk); end
      valid_in = 1; start = (i == 0); blk_id = 4'(id); din = 6'(d[i]);
    end
    @(posedge clk); last_in_cyc = cyc;
    if (idle_check) measure = 1;
    #1 valid_in = 0; start = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(4, 1);
    while (exp_d.size() > 0) @(posedge clk);
    checks++;
    if (first_out_cyc - last_in_cyc != 3) begin failures++; $display("FAIL latency %0d", first_out_cyc - last_in_cyc); end
    for (int id = 11; id >= 0; id--) send(id, 0);
    send(0, 0); send(6, 0);
    while (exp_d.size() > 0) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (gaps != 0) begin failures++; $display("FAIL %0d gaps", gaps); end
    checks++;
    if (n_wait == 0) begin failures++; $display("FAIL ready never low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
