// tb_sc_rom - checks the circulation-state ROM by its defining property:
// for every 802.16e block size and random data, encoding from state 0 gives
// the final state S0; starting again from Sc = ROM[{S0, N mod 7}] the
// encoder must end in Sc (tail-biting). The trellis comes from ctc_ref_pkg
// (bit-reversed state numbering), independent of the ROM contents.
module tb_sc_rom;
  import ctc_pkg::*;
  import ctc_ref_pkg::*;
  logic [5:0] addr;
  state_t     sc;
  sc_rom dut (.*);

  int checks = 0, failures = 0;
  function automatic int rev3(int s); return ((s & 1) << 2) | (s & 2) | ((s >> 2) & 1); endfunction

  initial begin #1_000_000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    for (int id = 0; id < 12; id++)
      for (int t = 0; t < 20; t++) begin
        int n, s0, s;
        int da[], db[];
        n = sizes[id];
        da = new[n]; db = new[n];
        for (int i = 0; i < n; i++) begin da[i] = $urandom_range(0, 1); db[i] = $urandom_range(0, 1); end
        s0 = rev3(run(0, n, da, db));
        addr = 6'(s0 * 8 + n % 7);
        #1;
        s = rev3(run(rev3(int'(sc)), n, da, db));
        checks++;
        if (s != int'(sc)) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d S0=%0d Sc=%0d ends in %0d", n, s0, sc, s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
