// ctc_pkg - shared constants, types and helper functions of the IEEE 802.16e
// convolutional turbo code (CTC) encoder and decoder.
//
// Block sizes: twelve non-HARQ block sizes N = 24 ... 240 couples (48 ... 480
// bits), selected everywhere by a 4-bit block identifier 0..11 in increasing
// size order. The interleaver start values P(1), P(2), P(3) come from the
// CTC interleaver ROM table; the increment 4*P0 uses the standard's P0 for each
// size. The sub-block interleaver parameters m and J follow the sub-block
// interleaver table.
//
// Trellis: the constituent encoder holds three bits S1 S2 S3 (S1 nearest the
// input). A state is numbered 4*S1 + 2*S2 + S3, the numbering of the
// circulation-state table. With inputs A, B:
//   S1' = A ^ B ^ S1 ^ S3   (feedback 1 + D + D^3)
//   S2' = B ^ S1
//   S3' = B ^ S2
//   Y   = A ^ B ^ S1 ^ S2   (1 + D^2 + D^3)
//   W   = A ^ B ^ S1        (1 + D^3)
// Branch metrics are indexed by the 4-bit label {a, b, y, w} of a branch.
package ctc_pkg;

  localparam int NUM_SIZES = 12;
  localparam int NMAX      = 240;     // largest block, couples
  localparam int KW        = 8;       // width of a couple index
  localparam int RXW       = 4;       // received soft value width
  localparam int LEW       = 6;       // extrinsic likelihood width
  localparam int BMW       = 7;       // widest branch metric
  localparam int SMW       = 8;       // state metric width
  localparam int TW        = 10;      // branch likelihood T_k(a,b) width
  localparam int BM_MEM_W  = 97;      // packed bits of the 15 stored branch metrics

  typedef logic [3:0]            blk_id_t;
  typedef logic [KW-1:0]         idx_t;
  typedef logic [2:0]            state_t;
  typedef logic signed [RXW-1:0] rx_t;
  typedef logic signed [LEW-1:0] le_t;
  typedef logic signed [BMW-1:0] bm_t;
  typedef logic signed [SMW-1:0] sm_t;
  typedef logic signed [TW-1:0]  tl_t;

  // Block size N (couples) of a block identifier.
  function automatic int blk_n(input blk_id_t id);
    case (id)
      4'd0:  return 24;   4'd1:  return 36;   4'd2:  return 48;
      4'd3:  return 72;   4'd4:  return 96;   4'd5:  return 108;
      4'd6:  return 120;  4'd7:  return 144;  4'd8:  return 180;
      4'd9:  return 192;  4'd10: return 216;  default: return 240;
    endcase
  endfunction

  // Interleaver parameter P0 of the standard.
  function automatic int blk_p0(input blk_id_t id);
    case (id)
      4'd0:  return 5;   4'd1:  return 11;  4'd2:  return 13;
      4'd3:  return 11;  4'd4:  return 7;   4'd5:  return 11;
      4'd6:  return 13;  4'd7:  return 17;  4'd8:  return 11;
      4'd9:  return 11;  4'd10: return 13;  default: return 13;
    endcase
  endfunction

  // Start values of the recursive address generator: P(j) for j = 0..3.
  function automatic int blk_pinit(input blk_id_t id, input int j);
    int t [12][3];
    t = '{'{18, 11, 4},  '{12, 23, 34}, '{14, 27, 40}, '{54, 23, 4},
          '{8, 39, 46},  '{12, 79, 90}, '{14, 27, 40}, '{20, 107, 126},
          '{12, 23, 34}, '{12, 71, 82}, '{14, 27, 40}, '{14, 87, 100}};
    if (j == 0) return 1;
    return t[(id > 4'd11) ? 11 : int'(id)][j-1];
  endfunction

  // Sub-block interleaver parameters.
  function automatic int sbi_m(input blk_id_t id);
    case (id)
      4'd0: return 3;  4'd1, 4'd2: return 4;  4'd3, 4'd4, 4'd5: return 5;
      4'd11: return 7; default: return 6;
    endcase
  endfunction

  function automatic int sbi_j(input blk_id_t id);
    case (id)
      4'd5, 4'd10: return 4;  4'd6, 4'd11: return 2;  default: return 3;
    endcase
  endfunction

  // Interleaver address P(j), closed form of the recursion
  // P(j) = (P(j mod 4) + (j div 4) * 4*P0) mod N.
  function automatic int intlv_p(input blk_id_t id, input int j);
    return (blk_pinit(id, j % 4) + (j / 4) * 4 * blk_p0(id)) % blk_n(id);
  endfunction

  function automatic state_t enc_next(input state_t s, input logic a, input logic b);
    return {a ^ b ^ s[2] ^ s[0], b ^ s[2], b ^ s[1]};
  endfunction

  // {Y, W} parity of a branch.
  function automatic logic [1:0] enc_par(input state_t s, input logic a, input logic b);
    return {a ^ b ^ s[2] ^ s[1], a ^ b ^ s[2]};
  endfunction

  // Circulation state from N mod 7 (1..6) and the final state of a zero-start encoding.
  function automatic state_t sc_lookup(input logic [2:0] nmod7, input state_t s);
    logic [2:0] t [6][8];
    t = '{'{3'd0, 3'd6, 3'd4, 3'd2, 3'd7, 3'd1, 3'd3, 3'd5},
          '{3'd0, 3'd3, 3'd7, 3'd4, 3'd5, 3'd6, 3'd2, 3'd1},
          '{3'd0, 3'd5, 3'd3, 3'd6, 3'd2, 3'd7, 3'd1, 3'd4},
          '{3'd0, 3'd4, 3'd1, 3'd5, 3'd6, 3'd2, 3'd7, 3'd3},
          '{3'd0, 3'd2, 3'd5, 3'd7, 3'd1, 3'd3, 3'd4, 3'd6},
          '{3'd0, 3'd7, 3'd6, 3'd1, 3'd3, 3'd4, 3'd5, 3'd2}};
    if (nmod7 == 3'd0 || nmod7 == 3'd7) return 3'd0;
    return t[int'(nmod7) - 1][s];
  endfunction

  // Bit width of stored branch metric {a,b,y,w}: parity-only metrics need
  // 4 or 5 bits, metrics that carry an extrinsic term need 7.
  function automatic int bm_width(input int lbl);
    if (lbl < 4) return (lbl == 3) ? 5 : 4;
    return 7;
  endfunction

  function automatic int bm_offset(input int lbl);
    int o;
    o = 0;
    for (int i = 1; i < lbl; i++) o += bm_width(i);
    return o;
  endfunction

  // Saturate a wide signed value to w bits (w <= 16).
  function automatic logic signed [15:0] sat(input logic signed [15:0] v, input int w);
    logic signed [15:0] hi, lo;
    hi = 16'sd1 <<< (w - 1);
    lo = -hi;
    hi = hi - 16'sd1;
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
