// dtcwt_ref_pkg: plain behavioural reference of the level-1 2D DTCWT used by
// the testbenches. It is written independently of the RTL: direct 10-tap
// convolutions with decimation by two and half-sample symmetric extension,
// y[m] = sum_k h[k] * x[ext(2m + k - 4)], on integers without rounding.
package dtcwt_ref_pkg;
  // filters 0=La 1=Ha 2=Lb 3=Hb, taps 0..9
  localparam int H [4][10] = '{
    '{  0, -22, -22, 178,  178,   22, -22,   2,   2,  0},
    '{  0,  -2,   2,  22,   22, -178, 178, -22, -22,  0},
    '{  2,   2, -22,  22,  178,  178,  22, -22,   0,  0},
    '{  0,   0, -22, -22,  178, -178,  22,  22,   2, -2}};

  function automatic int ext(input int i, input int n);
    int j = i;
    if (j < 0)  j = -j - 1;
    if (j >= n) j = 2 * n - 1 - j;
    return j;
  endfunction

  // one decimated filter output of a line given as a queue of samples
  function automatic longint fir(input int f, input longint line[$], input int m);
    longint s = 0;
    for (int k = 0; k < 10; k++) s += longint'(H[f][k]) * line[ext(2 * m + k - 4, line.size())];
    return s;
  endfunction
endpackage
