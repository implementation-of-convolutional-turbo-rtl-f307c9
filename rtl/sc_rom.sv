// sc_rom - circulation state look-up ROM of the CTC encoder.
//
// The 6-bit address is {final state of the zero-start encoding, N mod 7};
// each of the 64 words holds the 3-bit circulation state Sc (192 bits). The
// contents follow the circulation-state table; rows with N mod 7 = 0 or 7
// cannot occur for 802.16e block sizes and hold 0.
//
// Interface and timing: combinational read, addr in, sc out.
module sc_rom
  import ctc_pkg::*;
(
  input  logic [5:0] addr,   // {SO_N-1, N mod 7}
  output state_t     sc
);
  state_t rom [64];

  always_comb begin
    for (int i = 0; i < 64; i++)
      rom[i] = sc_lookup(3'(i % 8), 3'(i / 8));
  end

  assign sc = rom[addr];
endmodule
