// trk_pkg - shared constants, types and functions of the sampling-clock and
// residual carrier frequency tracking chain (FFT size 1024, FUSC).
//
// Angles are binary angles: a ZW-bit two's complement number z stands for
// z * pi / 2^(ZW-1) radians, so the full circle wraps naturally and +pi and
// -pi share the code -2^(ZW-1). Subcarrier samples are DW-bit two's
// complement. Subcarrier indices run from -512 to 511 (10-bit signed).
package trk_pkg;
  localparam int DW    = 8;     // sample width
  localparam int ZW    = 10;    // angle width
  localparam int XW    = 12;    // CORDIC datapath width (2 fraction bits)
  localparam int NITER = 8;     // CORDIC iterations
  localparam int IW    = 10;    // subcarrier index width
  localparam int AW_C  = 5;     // slope coefficient width (2 fraction bits)

  typedef logic signed [DW-1:0] samp_t;
  typedef logic signed [ZW-1:0] ang_t;
  typedef logic signed [XW-1:0] cx_t;
  typedef logic signed [IW-1:0] sidx_t;
  typedef logic signed [AW_C-1:0] slope_t;

  typedef enum logic {CORDIC_ROTATE = 1'b0, CORDIC_VECTOR = 1'b1} cordic_mode_t;

  // arctan(2^-i) in angle units (pi / 512), rounded
  function automatic ang_t atan_tab(input int i);
    case (i)
      0: return ang_t'(128);  1: return ang_t'(76);  2: return ang_t'(40);
      3: return ang_t'(20);   4: return ang_t'(10);  5: return ang_t'(5);
      6: return ang_t'(3);    7: return ang_t'(1);   default: return ang_t'(0);
    endcase
  endfunction

  // FUSC pilot positions for FFT size 1024: two constant sets (every 144th
  // subcarrier from -415 and from -343) and two variable sets (every 24th
  // subcarrier from -424 and from -412), the variable sets moved by +6 in
  // odd symbols; 82 pilots per symbol.
  function automatic logic is_pilot(input sidx_t k, input logic odd);
    int x, v;
    x = int'(k);
    if (x >= -415 && x <= 305 && (x + 415) % 144 == 0) return 1'b1;
    if (x >= -343 && x <= 233 && (x + 343) % 144 == 0) return 1'b1;
    v = odd ? x - 6 : x;
    if (v >= -424 && v <= 416 && (v + 424) % 24 == 0) return 1'b1;
    if (v >= -412 && v <= 404 && (v + 412) % 24 == 0) return 1'b1;
    return 1'b0;
  endfunction
endpackage
