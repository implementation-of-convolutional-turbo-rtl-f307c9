// tb_turbo_decoder - self-checking test of the iterative turbo decoder.
//
// Random blocks are encoded by the reference model in ctc_ref_pkg, turned
// into 4-bit soft values (amplitude 3, Gaussian noise), loaded and decoded.
// Checks: noiseless blocks of several sizes decode without error; noisy
// blocks decode with fewer bit errors than the raw hard decisions had and,
// summed over the noisy blocks, at most a small residual error; the decoding
// time matches 2 * iterations * ((ceil(N/32)+1)*32 + drain).
module tb_turbo_decoder;
  import ctc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_ready, in_valid, in_start, out_valid, out_start, out_a, out_b, busy;
  logic [3:0] blk_id, num_iter;
  logic signed [3:0] ra, rb, ry1, rw1, ry2, rw2;
  int checks = 0, failures = 0;

  turbo_decoder dut (.*);

  int na[], nb[], y1[], w1[], y2[], w2[];
  int got_a[$], got_b[$];
  always @(posedge clk) if (out_valid) begin got_a.push_back(out_a); got_b.push_back(out_b); end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic one_block(int id, int iters, real sigma, output int raw_err, output int dec_err,
                           output int cycles);
    int n = sizes[id];
    int t0;
    na = new[n]; nb = new[n];
    for (int i = 0; i < n; i++) begin na[i] = $urandom % 2; nb[i] = $urandom % 2; end
    encode(id, na, nb, y1, w1, y2, w2);
    got_a.delete(); got_b.delete();
    raw_err = 0;
    while (!in_ready) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1; in_start = (i == 0); blk_id = 4'(id); num_iter = 4'(iters);
      ra = 4'(soft_val(na[i], 3.0, sigma)); rb = 4'(soft_val(nb[i], 3.0, sigma));
      ry1 = 4'(soft_val(y1[i], 3.0, sigma)); rw1 = 4'(soft_val(w1[i], 3.0, sigma));
      ry2 = 4'(soft_val(y2[i], 3.0, sigma)); rw2 = 4'(soft_val(w2[i], 3.0, sigma));
      if ((ra > 0) != (na[i] == 1)) raw_err++;
      if ((rb > 0) != (nb[i] == 1)) raw_err++;
    end
    @(negedge clk); in_valid = 0; in_start = 0;
    t0 = cyc;
    while (got_a.size() < n) @(negedge clk);
    cycles = cyc - t0;
    dec_err = 0;
    for (int i = 0; i < n; i++) begin
      if (got_a[i] != na[i]) dec_err++;
      if (got_b[i] != nb[i]) dec_err++;
    end
  endtask

  initial begin
    int raw, dec, cyc_used, tot_raw, tot_dec;
    in_valid = 0; in_start = 0; blk_id = 0; num_iter = 4;
    {ra, rb, ry1, rw1, ry2, rw2} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // noiseless blocks
    foreach (sizes[k]) if (k % 3 == 0 || k == 11) begin
      one_block(k, 2, 0.0, raw, dec, cyc_used);
      checks++;
      if (dec != 0) begin failures++; $display("N=%0d noiseless: %0d errors", sizes[k], dec); end
      // timing: 2 passes per iteration, each (ceil(N/32)+1)*32 cycles plus drain
      checks++;
      begin
        int exp_c;
        exp_c = 2 * 2 * (((sizes[k] + 31) / 32 + 1) * 32 + 10) + sizes[k];
        if (cyc_used < exp_c - 8 || cyc_used > exp_c + 8) begin
          failures++; $display("N=%0d took %0d cycles, expected about %0d", sizes[k], cyc_used, exp_c);
        end
      end
    end
    // noisy blocks, N = 240, 4 iterations
    tot_raw = 0; tot_dec = 0;
    for (int r = 0; r < 6; r++) begin
      one_block(11, 4, 1.5, raw, dec, cyc_used);
      $display("noisy block %0d: raw bit errors %0d, after decoding %0d", r, raw, dec);
      tot_raw += raw; tot_dec += dec;
      checks++;
      if (dec > raw) begin failures++; $display("decoding made it worse"); end
    end
    checks++;
    if (tot_raw < 20 || tot_dec * 10 > tot_raw) begin
      failures++; $display("noisy totals: raw %0d decoded %0d", tot_raw, tot_dec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
