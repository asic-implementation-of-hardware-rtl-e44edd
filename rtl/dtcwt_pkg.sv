// dtcwt_pkg: constants, filter table and index helpers shared by the
// level-1 2D dual-tree complex wavelet transform (DTCWT) processor.
//
// The four 10-tap filters are the integer-scaled analysis filters of the
// two trees: La/Ha (tree a, "real") and Lb/Hb (tree b, "imaginary"). Their
// values are the published integer table; they are stored as 16-bit signed
// numbers. Filter indices used everywhere: 0=La, 1=Ha, 2=Lb, 3=Hb.
//
// A window of 10 taps is processed in SEG_CYC=6 cycles: taps 0..5 go through
// the "MSB" MAC, taps 6..9 through the "LSB" MAC in phases 2..5 (phases 0 and
// 1 carry zeros). Output m of a line of length n is
//     y[m] = sum_k h[k] * x[ext(2m + k - 4)],   k = 0..9,  m = 0..n/2-1
// where ext() is half-sample symmetric extension (x[-1]=x[0], x[n]=x[n-1]).
// The offset of -4 centres the window; it is this design's choice.
package dtcwt_pkg;

  localparam int unsigned TAPS     = 10;  // filter length
  localparam int unsigned M_TAPS   = 6;   // taps handled by the MSB MAC
  localparam int unsigned L_TAPS   = 4;   // taps handled by the LSB MAC
  localparam int unsigned SEG_CYC  = 6;   // cycles per output window
  localparam int unsigned L_LEAD   = SEG_CYC - L_TAPS; // leading zero cycles of the LSB stream
  localparam int          WIN_OFF  = 4;   // window start = 2m - WIN_OFF
  localparam int unsigned NUM_FILT = 4;

  localparam int unsigned COEF_W   = 16;  // coefficient word
  localparam int unsigned PIX_W    = 8;   // unsigned input pixel
  // sum over taps of |h| is 448 for every filter (< 2^9), so each filter
  // pass grows the magnitude by at most 9 bits
  localparam int unsigned GAIN_W   = 9;
  localparam int unsigned ROW_W    = PIX_W + GAIN_W + 1;   // signed row-stage result (18)
  localparam int unsigned COL_W    = ROW_W + GAIN_W;       // signed column-stage result (27)
  localparam int unsigned OUT_W    = COL_W + 1;            // signed combined result (28)

  typedef enum logic [1:0] {FILT_LA = 2'd0, FILT_HA = 2'd1, FILT_LB = 2'd2, FILT_HB = 2'd3} filt_e;

  typedef logic signed [COEF_W-1:0] coef_t;

  // Integer filter table, one row per filter, tap order 0..9.
  function automatic coef_t coef(input int unsigned filt, input int unsigned tap);
    coef_t t;
    unique case (filt)
      0: case (tap) 1: t = -22; 2: t = -22; 3: t = 178; 4: t = 178; 5: t = 22;
                    6: t = -22; 7: t = 2;   8: t = 2;   default: t = 0; endcase
      1: case (tap) 1: t = -2;  2: t = 2;   3: t = 22;  4: t = 22;  5: t = -178;
                    6: t = 178; 7: t = -22; 8: t = -22; default: t = 0; endcase
      2: case (tap) 0: t = 2;   1: t = 2;   2: t = -22; 3: t = 22;  4: t = 178;
                    5: t = 178; 6: t = 22;  7: t = -22; default: t = 0; endcase
      default:
         case (tap) 2: t = -22; 3: t = -22; 4: t = 178; 5: t = -178; 6: t = 22;
                    7: t = 22;  8: t = 2;   9: t = -2;  default: t = 0; endcase
    endcase
    return t;
  endfunction

  // Coefficient fed to the MSB MAC in a given phase (taps 0..5).
  function automatic coef_t coef_m(input int unsigned filt, input int unsigned phase);
    return coef(filt, phase);
  endfunction

  // Coefficient fed to the LSB MAC in a given phase (zero, zero, taps 6..9).
  function automatic coef_t coef_l(input int unsigned filt, input int unsigned phase);
    return (phase < L_LEAD) ? coef_t'(0) : coef(filt, M_TAPS + phase - L_LEAD);
  endfunction

  // Half-sample symmetric extension of index i into 0..n-1 (valid for
  // -n <= i < 2n).
  function automatic int unsigned mirror(input int i, input int n);
    if (i < 0)       return int'(-1 - i);
    else if (i >= n) return int'(2 * n - 1 - i);
    else             return i;
  endfunction

endpackage
