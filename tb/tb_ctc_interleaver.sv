// tb_ctc_interleaver - checks the CTC interleaver: output couple j is input
// couple P(j), swapped when P(j) is odd (standard formula from
// ctc_ref_pkg). Blocks of different sizes follow each other as fast as
// ready allows, including a short block after a long one (pending start).
// Timing: the first output couple must appear 3 cycles after the last input
// couple when the interleaver was idle, and a block's couples leave in
// consecutive cycles.
module tb_ctc_interleaver;
  import ctc_pkg::*;
  import ctc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, valid_in = 0, a = 0, b = 0, ready, valid_out, start_out, a_out, b_out;
  blk_id_t blk_id = 0, blk_id_out;
  ctc_interleaver dut (.*);

  int checks = 0, failures = 0, cyc = 0, n_wait = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #5_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  int exp_a[$], exp_b[$], exp_first[$], exp_id[$];
  int last_in_cyc, first_out_cyc, prev_out, gaps;
  bit measure;
  always @(posedge clk) if (rst_n && valid_out) begin
    int ea, eb, ef, ei;
    ea = exp_a.pop_front(); eb = exp_b.pop_front(); ef = exp_first.pop_front(); ei = exp_id.pop_front();
    checks++;
    if (a_out != ea || b_out != eb || start_out != ef || (ef && int'(blk_id_out) != ei)) begin
      failures++;
      if (failures < 10) $display("FAIL out (%0d,%0d,%0d) exp (%0d,%0d,%0d)", a_out, b_out, start_out, ea, eb, ef);
    end
    if (start_out && measure) begin first_out_cyc = cyc; measure = 0; end
    if (!start_out && cyc != prev_out + 1) gaps++;
    prev_out = cyc;
  end

  task automatic send(int id, bit idle_check);
    int n, p;
    int da[], db[];
    n = sizes[id];
    da = new[n]; db = new[n];
    for (int i = 0; i < n; i++) begin da[i] = $urandom_range(0, 1); db[i] = $urandom_range(0, 1); end
    for (int j = 0; j < n; j++) begin
      p = pj(id, j);
      exp_a.push_back(p % 2 ? db[p] : da[p]);
      exp_b.push_back(p % 2 ? da[p] : db[p]);
      exp_first.push_back(j == 0); exp_id.push_back(id);
    end
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      while (!ready) begin valid_in = 0; start = 0; n_wait++; @(negedge clk); end
      valid_in = 1; start = (i == 0); blk_id = 4'(id); a = da[i][0]; b = db[i][0];
    end
    @(posedge clk); last_in_cyc = cyc;
    if (idle_check) measure = 1;
    #1 valid_in = 0; start = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(3, 1);
    while (exp_a.size() > 0) @(posedge clk);
    checks++;
    if (first_out_cyc - last_in_cyc != 3) begin failures++; $display("FAIL latency %0d", first_out_cyc - last_in_cyc); end
    send(11, 0); send(0, 0); send(0, 0); send(7, 0); send(5, 0); send(11, 0); send(2, 0);
    while (exp_a.size() > 0) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (gaps != 0) begin failures++; $display("FAIL %0d gaps inside blocks", gaps); end
    checks++;
    if (n_wait == 0) begin failures++; $display("FAIL ready never low"); end
    $display("waited %0d cycles on ready", n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
