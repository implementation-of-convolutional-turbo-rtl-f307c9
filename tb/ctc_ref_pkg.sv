// ctc_ref_pkg - reference model of the 802.16e CTC encoder for testbenches.
//
// Written independently of the RTL: the trellis comes from the decoder state
// transition table (states numbered S1 + 2*S2 + 4*S3 there), the interleaver
// from the standard's formula with parameters P0..P3, and the circulation
// state is found by trying all eight start states. Also provides a Gaussian
// noise source for soft channel values.
package ctc_ref_pkg;
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

  function automatic int run(int s0, int n, int sa[], int sb[]);
    int s = s0;
    for (int i = 0; i < n; i++) s = tnext[s][sa[i]*2 + sb[i]];
    return s;
  endfunction

  // Encode one block: returns systematic and the four parity sequences.
  function automatic void encode(int id, int na[], int nb[],
                                 output int y1[], output int w1[], output int y2[], output int w2[]);
    int n = sizes[id];
    int xa[], xb[];
    int s, sc1, sc2;
    xa = new[n]; xb = new[n]; y1 = new[n]; w1 = new[n]; y2 = new[n]; w2 = new[n];
    for (int j = 0; j < n; j++) begin
      int p = pj(id, j);
      if (p % 2 == 1) begin xa[j] = nb[p]; xb[j] = na[p]; end
      else begin xa[j] = na[p]; xb[j] = nb[p]; end
    end
    sc1 = 0; sc2 = 0;
    for (int c = 0; c < 8; c++) if (run(c, n, na, nb) == c) sc1 = c;
    for (int c = 0; c < 8; c++) if (run(c, n, xa, xb) == c) sc2 = c;
    s = sc1;
    for (int i = 0; i < n; i++) begin
      int o = tout[s][na[i]*2+nb[i]];
      y1[i] = o / 2; w1[i] = o % 2;
      s = tnext[s][na[i]*2+nb[i]];
    end
    s = sc2;
    for (int i = 0; i < n; i++) begin
      int o = tout[s][xa[i]*2+xb[i]];
      y2[i] = o / 2; w2[i] = o % 2;
      s = tnext[s][xa[i]*2+xb[i]];
    end
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  // 4-bit soft value of a bit with amplitude amp and noise sigma
  function automatic int soft_val(int bitv, real amp, real sigma);
    real v;
    int q;
    v = (bitv != 0 ? amp : -amp) + sigma * gauss();
    q = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
    if (q > 7) q = 7;
    if (q < -8) q = -8;
    return q;
  endfunction
endpackage
