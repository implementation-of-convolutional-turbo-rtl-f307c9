// tb_symbol_select - checks symbol grouping and selection: after a block of
// N words {A, B, Y1, Y2, W1, W2}, the L output symbols must be
// grouped[(F + i) mod 6N] with F = (SPID * L) mod 6N, the grouped order
// being A, B, Y1/Y2 interlaced, W1/W2 interlaced. All SPIDs, lengths from
// short (heavy puncturing) to 6N, windows that wrap. Timing: the L symbols
// leave in consecutive cycles with first/last flags, the first within 3
// cycles of the last input word, and ready stays low until the last symbol.
module tb_symbol_select;
  import ctc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, valid_in = 0, ready, valid_out, first, last, sym;
  blk_id_t blk_id = 0;
  logic [10:0] num_sym = 0;
  logic [1:0] spid = 0;
  logic [5:0] din = 0;
  symbol_select dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #5_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  int nt [12] = '{24,36,48,72,96,108,120,144,180,192,216,240};

  task automatic one(int id, int sp, int l);
    int n, f, t_last, t_first, got, bad, gaps, prev;
    int d[], g[];
    n = nt[id];
    d = new[n]; g = new[6*n];
    for (int i = 0; i < n; i++) begin
      d[i] = $urandom_range(0, 63);
      g[i] = (d[i] >> 5) & 1; g[n + i] = (d[i] >> 4) & 1;
      g[2*n + 2*i] = (d[i] >> 3) & 1; g[2*n + 2*i + 1] = (d[i] >> 2) & 1;
      g[4*n + 2*i] = (d[i] >> 1) & 1; g[4*n + 2*i + 1] = d[i] & 1;
    end
    f = (sp * l) % (6 * n);
    while (!ready) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      valid_in = 1; start = (i == 0); blk_id = 4'(id); num_sym = 11'(l); spid = 2'(sp); din = 6'(d[i]);
    end
    @(posedge clk); t_last = cyc;
    #1 valid_in = 0; start = 0;
    got = 0; bad = 0; gaps = 0; prev = 0; t_first = 0;
    while (got < l) begin
      @(posedge clk); #1;
      if (valid_out) begin
        if (got == 0) t_first = cyc;
        else if (cyc != prev + 1) gaps++;
        prev = cyc;
        if (sym != g[(f + got) % (6 * n)][0] || first != (got == 0) || last != (got == l - 1)) bad++;
        if (ready && got < l - 1) bad++;
        got++;
      end
    end
    checks += 3;
    if (bad != 0) begin failures++; $display("FAIL N=%0d SPID=%0d L=%0d: %0d bad symbols", n, sp, l, bad); end
    if (gaps != 0) begin failures++; $display("FAIL gaps %0d", gaps); end
    if (t_first - t_last > 3) begin failures++; $display("FAIL first symbol latency %0d", t_first - t_last); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int id = 0; id < 12; id++)
      for (int sp = 0; sp < 4; sp++) begin
        int l;
        l = (sp == 0) ? 6 * nt[id] : $urandom_range(nt[id] / 2, 6 * nt[id]);
        one(id, sp, l);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
