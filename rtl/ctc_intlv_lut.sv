// ctc_intlv_lut - banked look-up-table version of the CTC interleaver
// address generator, used by the turbo decoder.
//
// The decoder produces extrinsic values in reverse order inside each sliding
// window, so it needs P(j) for arbitrary j rather than the sequential
// recursion of ctc_intlv_addr_gen. The table holds one bank per block size
// (24 + 36 + ... + 240 = 1572 words of 8 bits, about 12 Kbit); a bank is
// selected by blk_id and addressed by j. The contents are computed at
// elaboration from P(j) = (P(j mod 4) + (j div 4) * 4*P0) mod N.
//
// Interface and timing: registered read, p is valid one cycle after j and
// blk_id are presented.
module ctc_intlv_lut
  import ctc_pkg::*;
(
  input  logic    clk,
  input  blk_id_t blk_id,
  input  idx_t    j,
  output idx_t    p
);
  localparam int LUT_SIZE = 1572;
  typedef idx_t lut_t [LUT_SIZE];

  function automatic lut_t gen_lut();
    lut_t t;
    int   base;
    base = 0;
    for (int id = 0; id < NUM_SIZES; id++) begin
      for (int k = 0; k < blk_n(4'(id)); k++)
        t[base + k] = idx_t'(intlv_p(4'(id), k));
      base += blk_n(4'(id));
    end
    return t;
  endfunction

  function automatic int bank_base(input blk_id_t id);
    int base;
    base = 0;
    for (int i = 0; i < NUM_SIZES; i++)
      if (i < int'(id)) base += blk_n(4'(i));
    return base;
  endfunction

  localparam lut_t LUT = gen_lut();

  logic [10:0] base_q;
  always_comb base_q = 11'(bank_base(blk_id));

  always_ff @(posedge clk) p <= LUT[base_q + 11'(j)];
endmodule
